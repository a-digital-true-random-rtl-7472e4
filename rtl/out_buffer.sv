// out_buffer -- buffer between the generator and the USB link to the host.
//
// The generator delivers at most one bit per sampling-clock cycle (100 Mbit/s
// raw at 100 MHz), while the host link takes bytes at its own pace. The
// buffer packs the incoming bits into bytes, first bit in bit 0, and queues
// the bytes in a FIFO of DEPTH bytes (byte_fifo). `flush` pushes a partly
// filled byte, padded with zeros, e.g. at the end of a restart. A byte that
// arrives while the FIFO is full is lost; this sets the sticky `overflow`
// flag, cleared by `clear_overflow`. The source only names this buffer: the
// packing order, the depth (4096 bytes, enough for one full 20000-bit
// restart) and the overflow policy are this design's choices.
//
// Interface (synchronous to clk, active-low asynchronous reset)
//   in_bit, in_valid          bit stream from the generator
//   flush                     emit a partial byte (after any bit in the same cycle)
//   out_data, out_valid, out_ready  byte stream to the USB interface
//   overflow, clear_overflow  sticky lost-data flag
//   level                     bytes queued
module out_buffer #(
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_bit,
  input  logic        in_valid,
  input  logic        flush,
  output logic [7:0]  out_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        overflow,
  input  logic        clear_overflow,
  output logic [AW:0] level
);

  logic [7:0] shreg;
  logic [3:0] nbits;
  logic [7:0] shreg_nx;
  logic [3:0] nbits_nx;
  logic       push;
  logic [7:0] push_data;
  logic       drop;

  always_comb begin
    shreg_nx = shreg;
    nbits_nx = nbits;
    if (in_valid) begin
      shreg_nx[nbits[2:0]] = in_bit;
      nbits_nx             = nbits + 1'b1;
    end
    push      = (nbits_nx == 4'd8) || (flush && nbits_nx != 4'd0);
    push_data = shreg_nx;
    if (push) begin
      shreg_nx = '0;
      nbits_nx = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      nbits <= '0;
    end else begin
      shreg <= shreg_nx;
      nbits <= nbits_nx;
    end
  end

  byte_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en   (push),
    .wr_data (push_data),
    .rd_data (out_data),
    .rd_valid(out_valid),
    .rd_ready(out_ready),
    .drop,
    .level
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)              overflow <= 1'b0;
    else if (drop)           overflow <= 1'b1;
    else if (clear_overflow) overflow <= 1'b0;

endmodule
