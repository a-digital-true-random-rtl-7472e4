// byte_fifo -- synchronous first-word-fall-through FIFO of WIDTH-bit words.
//
// A memory of DEPTH words (DEPTH a power of two) with read and write pointers
// one bit wider than the address, so full and empty are told apart by the top
// pointer bit. The head word is visible on rd_data whenever rd_valid is high
// and leaves the FIFO in a cycle with rd_valid && rd_ready. A write into a
// full FIFO is dropped and raises the one-cycle `drop` output.
//
// Interface (synchronous to clk, active-low asynchronous reset of the pointers)
//   wr_en, wr_data   write side
//   rd_data, rd_valid, rd_ready  read side, valid/ready handshake
//   level            number of stored words
module byte_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic             drop,
  output logic [AW:0]      level
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             full, empty, do_wr, do_rd;

  assign level    = wr_ptr - rd_ptr;
  assign full     = (level == (AW+1)'(DEPTH));
  assign empty    = (level == '0);
  assign do_wr    = wr_en && !full;
  assign do_rd    = rd_ready && !empty;
  assign rd_valid = !empty;
  assign rd_data  = mem[rd_ptr[AW-1:0]];
  assign drop     = wr_en && full;

  always_ff @(posedge clk) if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      a_level: assert (level <= (AW+1)'(DEPTH));
    end
  end

endmodule
