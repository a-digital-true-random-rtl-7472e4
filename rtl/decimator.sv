// decimator -- keeps every j-th bit of the combined sequence.
//
// Neighbouring bits of the combined generator are correlated; only bits
// spaced j >= m_min apart are unpredictable, where m_min is found by the
// restart / chi-square procedure for a given device and number of source
// oscillators (for example 3 for the main configuration on a Virtex-5). The
// decimator counts the valid input bits from the last `clear` (issued at
// every restart) and outputs bits number j, 2j, 3j, ... . The spacing `j` is
// a run-time input so that the same hardware serves any m_min; j = 1 passes
// the raw sequence and j = 0 is treated as 1. The counter width and the
// run-time input are this design's own choices.
//
// Interface (synchronous to clk, active-low asynchronous reset)
//   clear            restart the bit count (same cycle as a bit: bit counts as first)
//   j                decimation factor
//   in_bit/in_valid  combined bit stream
//   out_bit/out_valid decimated stream, registered: one cycle latency
module decimator #(
  parameter int unsigned J_W = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic [J_W-1:0] j,
  input  logic           in_bit,
  input  logic           in_valid,
  output logic           out_bit,
  output logic           out_valid
);

  logic [J_W-1:0] cnt;      // valid bits seen since the last output, minus one
  logic [J_W-1:0] j_last;   // j - 1, with j = 0 read as 1
  logic [J_W-1:0] cnt_cur;

  assign j_last  = (j == '0) ? '0 : j - 1'b1;
  assign cnt_cur = clear ? '0 : cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      cnt       <= cnt_cur;
      if (in_valid) begin
        if (cnt_cur >= j_last) begin
          cnt       <= '0;
          out_valid <= 1'b1;
          out_bit   <= in_bit;
        end else begin
          cnt <= cnt_cur + 1'b1;
        end
      end
    end
  end

endmodule
