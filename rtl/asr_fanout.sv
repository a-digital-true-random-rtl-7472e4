// asr_fanout -- behavioural model of the net that distributes the auxiliary
// source of randomness (ASR) to the K perturbing XOR gates.
//
// This is a simulation model, not synthesizable logic. In the FPGA the GARO
// output is one net routed to K XOR gates placed wherever the tools put them,
// so each copy arrives with its own routing delay. That matters: with no skew
// the same ASR level would be XORed into every sampled bit and, for an even
// K, cancel in the combined XOR. Copy k is the ASR signal delayed by
// BASE_PS + k * STEP_PS picoseconds (pure transport delay: every edge is
// passed on, however close the next one follows). The delays are this
// design's own choice; the source gives no placement or routing data.
// BASE_PS and STEP_PS must be even so that delayed edges keep the odd-
// picosecond alignment of the oscillator models.
//
// Interface
//   asr    ASR output
//   asr_k  K delayed copies, one per XOR gate
module asr_fanout #(
  parameter int unsigned K       = trng_pkg::DEFAULT_K,
  parameter int unsigned BASE_PS = 100,
  parameter int unsigned STEP_PS = 38
) (
  input  logic         asr,
  output logic [K-1:0] asr_k
);

  // Delays below are whole picoseconds.
  timeunit 1ps;
  timeprecision 1ps;

  initial asr_k = '1;

  // Each copy keeps a queue of pending edges (time due, new level). All
  // copies have a fixed delay, so edges fall due in the order they arrive.
  for (genvar k = 0; k < K; k++) begin : g_copy
    localparam longint DELAY = longint'(BASE_PS) + longint'(k * STEP_PS);

    longint      due_q[$];
    logic        val_q[$];
    int unsigned n_in;
    int unsigned n_out;

    initial begin
      n_in  = 0;
      n_out = 0;
    end

    always @(asr) begin
      due_q.push_back($time + DELAY);
      val_q.push_back(asr);
      n_in++;
    end

    always begin
      wait (n_in != n_out);
      #(due_q[0] - $time);
      asr_k[k] = val_q.pop_front();
      void'(due_q.pop_front());
      n_out++;
    end
  end

endmodule
