// tb_out_buffer -- self-checking test of out_buffer (with a 16-byte FIFO).
// Random bits are written with random gaps while the reader takes bytes with
// a random ready; a queue in the testbench packs the same bits into bytes,
// first bit in bit 0, and every byte read must match it. It also checks that
// flush emits a zero-padded partial byte, that a full FIFO drops bytes and
// sets the sticky overflow flag, and that clear_overflow clears it.
module tb_out_buffer;
  localparam int DEPTH = 16;

  logic       clk = 1'b0;
  logic       rst_n, in_bit, in_valid, flush, out_valid, out_ready;
  logic       overflow, clear_overflow;
  logic [7:0] out_data;
  logic [4:0] level;
  int         checks = 0, failures = 0;

  out_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #500us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [7:0] exp_q[$];
  logic [7:0] acc;
  int         nacc;
  int         got;

  // Reference packer: called once per cycle with that cycle's inputs.
  task automatic ref_cycle(input logic b, input logic v, input logic f);
    if (v) begin
      acc[nacc] = b;
      nacc++;
    end
    if (nacc == 8 || (f && nacc > 0)) begin
      for (int i = nacc; i < 8; i++) acc[i] = 1'b0;
      exp_q.push_back(acc);
      acc  = '0;
      nacc = 0;
    end
  endtask

  // Reader side: compare every byte handed over.
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    got++;
    if (exp_q.size() == 0) check(1'b0, "byte without reference");
    else check(out_data == exp_q.pop_front(), "byte value");
  end

  initial begin
    rst_n = 1'b1;
    #1;
    rst_n = 1'b0; in_bit = 1'b0; in_valid = 1'b0; flush = 1'b0;
    out_ready = 1'b0; clear_overflow = 1'b0;
    acc = '0; nacc = 0; got = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // Phase 1: streaming with random ready; the reader keeps up.
    for (int cyc = 0; cyc < 3000; cyc++) begin
      in_valid  = ($urandom % 3) == 0;
      in_bit    = 1'($urandom);
      flush     = ($urandom % 97) == 0;
      out_ready = ($urandom % 4) != 0;
      ref_cycle(in_bit, in_valid, flush);
      @(negedge clk);
    end
    in_valid = 1'b0; flush = 1'b1; out_ready = 1'b1;
    ref_cycle(1'b0, 1'b0, 1'b1);
    @(negedge clk);
    flush = 1'b0;
    repeat (40) @(negedge clk);
    check(exp_q.size() == 0, "all bytes delivered");
    check(!overflow, "no overflow while reader keeps up");
    check(got > 100, "enough bytes seen");
    // Phase 2: flush of a 3-bit partial byte 101 -> 8'b0000_0101.
    in_valid = 1'b1;
    in_bit = 1'b1; ref_cycle(1'b1, 1'b1, 1'b0); @(negedge clk);
    in_bit = 1'b0; ref_cycle(1'b0, 1'b1, 1'b0); @(negedge clk);
    in_bit = 1'b1; ref_cycle(1'b1, 1'b1, 1'b0); @(negedge clk);
    in_valid = 1'b0;
    check(exp_q.size() == 0, "no byte before flush");
    flush = 1'b1; ref_cycle(1'b0, 1'b0, 1'b1); @(negedge clk);
    flush = 1'b0;
    check(exp_q.size() == 1 && exp_q[0] == 8'h05, "reference partial byte");
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "partial byte delivered");
    // Phase 3: reader stalls; DEPTH bytes fit, the next one is dropped.
    out_ready = 1'b0;
    in_valid  = 1'b1;
    for (int i = 0; i < (DEPTH + 1) * 8; i++) begin
      in_bit = 1'($urandom);
      if (i < DEPTH * 8) ref_cycle(in_bit, 1'b1, 1'b0);
      @(negedge clk);
      if (i == DEPTH * 8 - 1) check(!overflow && level == 5'(DEPTH), "full without loss");
    end
    in_valid = 1'b0;
    @(negedge clk);
    check(overflow, "overflow flagged after a dropped byte");
    out_ready = 1'b1;
    repeat (DEPTH + 4) @(negedge clk);
    check(exp_q.size() == 0, "stored bytes intact after overflow");
    check(overflow, "overflow is sticky");
    clear_overflow = 1'b1;
    @(negedge clk);
    clear_overflow = 1'b0;
    check(!overflow, "overflow cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
