// restart_ctrl -- restart sequencer of the combined TRNG.
//
// The generator is evaluated, and used, by restarting it from identical
// initial conditions: every inverter of the source oscillators and of the
// GARO is a NAND gate whose second input is the enable `osc_en` produced here.
// A `start` pulse (the external trigger) raises `osc_en` for exactly
// BITS_PER_RESTART clock cycles, so exactly that many samples are taken while
// the rings run (20000 per restart in the reference measurements). Then
// `osc_en` is dropped, which freezes every ring at its all-ones state, and the
// sequencer waits OFF_CYCLES more cycles so that the combining pipeline has
// delivered its last tagged bit and the rings have settled, before it pulses
// `done` and accepts the next trigger. `run_start` pulses in the cycle in
// which `osc_en` rises; downstream logic uses it to restart bit counting.
//
// Interface (all synchronous to clk, active-low asynchronous reset)
//   start      trigger; ignored while busy
//   osc_en     oscillator enable (NAND gate input)
//   run_start  one-cycle pulse with the first cycle of osc_en
//   busy       high from the cycle after the trigger until done
//   done       one-cycle pulse in the first idle cycle after a restart
// Timing: a start sampled at clock edge t gives osc_en high in the
// BITS_PER_RESTART cycles after that edge, OFF_CYCLES off cycles (busy still
// high), then done in the cycle after those; a new trigger is accepted in the
// done cycle. OFF_CYCLES must be at least 1.
// The run length follows the reference measurements; the off time and the
// handshake are this design's own choice.
module restart_ctrl #(
  parameter int unsigned BITS_PER_RESTART = trng_pkg::DEFAULT_BITS_PER_RESTART,
  parameter int unsigned OFF_CYCLES       = 16,
  localparam int unsigned CW = $clog2(BITS_PER_RESTART + OFF_CYCLES + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic osc_en,
  output logic run_start,
  output logic busy,
  output logic done
);

  if (OFF_CYCLES < 1) begin : g_bad_off
    $error("restart_ctrl: OFF_CYCLES must be at least 1");
  end

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_OFF} state_e;

  state_e         state;
  logic [CW-1:0]  cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      run_start <= 1'b0;
      done      <= 1'b0;
    end else begin
      run_start <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state     <= S_RUN;
          cnt       <= CW'(BITS_PER_RESTART - 1);
          run_start <= 1'b1;
        end
        S_RUN: begin
          if (cnt == '0) begin
            state <= S_OFF;
            cnt   <= CW'(OFF_CYCLES - 1);
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_OFF: begin
          if (cnt == '0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign osc_en = (state == S_RUN);
  assign busy   = (state != S_IDLE);

  // The enable must stay high for exactly one restart's worth of samples.
  logic [CW-1:0] en_len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_len <= '0;
    end else if (osc_en) begin
      en_len <= en_len + 1'b1;
    end else begin
      if (en_len != '0) a_run_length: assert (en_len == CW'(BITS_PER_RESTART));
      en_len <= '0;
    end
  end

endmodule
