// trng_ref_monitor -- reference model of the digital path of trng_top, for
// testbenches.
//
// It watches the oscillator and GARO outputs and the oscillator enable of a
// trng_top instance and samples them on the same clock edges as the design.
// For every edge at which the oscillators were enabled it forms the expected
// combined bit as the XOR over k of (ro[k] ^ asr[k]), numbers the bits from the
// start of the run, keeps every j-th one, packs the kept bits into bytes
// (first bit in bit 0) and flushes a partial byte on `done`. The expected
// bytes collect in exp_q, in order; the testbench compares them with what
// leaves the design. It also counts the enabled sample edges at which the
// first ASR copy was 1, those at which the K copies disagreed (an ASR edge in
// flight through the routing, so the perturbation does not cancel), and the
// bits kept.
module trng_ref_monitor #(
  parameter int unsigned K   = 20,
  parameter int unsigned J_W = 16
) (
  input logic           clk,
  input logic [K-1:0]   ro,
  input logic [K-1:0]   asr,
  input logic           osc_en,
  input logic           run_start,
  input logic           done,
  input logic [J_W-1:0] j
);

  logic [7:0] exp_q[$];
  int         asr_high   = 0;
  int         asr_skewed = 0;
  int         kept       = 0;
  int         nth        = 0;
  logic [7:0] acc        = '0;
  int         nacc       = 0;

  always @(posedge clk) begin
    if (run_start) nth = 0;
    if (osc_en) begin
      logic b;
      int   jj;
      b = 1'b0;
      for (int k = 0; k < K; k++) b ^= ro[k] ^ asr[k];
      if (asr != '0 && asr != '1) asr_skewed++;
      if (asr[0]) asr_high++;
      jj = (j == '0) ? 1 : int'(j);
      nth++;
      if (nth % jj == 0) begin
        kept++;
        acc[nacc] = b;
        nacc++;
        if (nacc == 8) begin
          exp_q.push_back(acc);
          acc  = '0;
          nacc = 0;
        end
      end
    end
    if (done && nacc > 0) begin
      exp_q.push_back(acc);
      acc  = '0;
      nacc = 0;
    end
  end

endmodule
