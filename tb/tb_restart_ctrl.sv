// tb_restart_ctrl -- self-checking test of restart_ctrl.
// With a short run of 50 samples and 5 off cycles it checks, cycle by cycle
// against a count kept in the testbench, that osc_en is high for exactly 50
// cycles starting one cycle after the trigger, that run_start pulses with the
// first of them, that done pulses 50 + 5 + 1 cycles after the trigger edge, that
// busy covers the run and the off cycles and that a trigger while busy is ignored.
module tb_restart_ctrl;
  localparam int NB  = 50;
  localparam int OFF = 5;

  logic clk = 1'b0;
  logic rst_n, start;
  logic osc_en, run_start, busy, done;
  int   checks = 0, failures = 0;

  restart_ctrl #(.BITS_PER_RESTART(NB), .OFF_CYCLES(OFF)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #100us;
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

  task automatic one_restart(input int gap, input bit poke_while_busy);
    int en_cycles;
    repeat (gap) begin
      @(negedge clk);
      check(!busy && !osc_en && !done, "idle before trigger");
    end
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    en_cycles = 0;
    // Cycle c after the trigger edge (c = 1 is the first cycle after it).
    for (int c = 1; c <= NB + OFF + 1; c++) begin
      check(osc_en == (c <= NB), $sformatf("osc_en in cycle %0d", c));
      check(run_start == (c == 1), $sformatf("run_start in cycle %0d", c));
      check(busy == (c <= NB + OFF), $sformatf("busy in cycle %0d", c));
      check(done == (c == NB + OFF + 1), $sformatf("done in cycle %0d", c));
      if (osc_en) en_cycles++;
      if (poke_while_busy && c == 20) start = 1'b1;
      if (c == 21) start = 1'b0;
      @(negedge clk);
    end
    check(en_cycles == NB, "number of enabled cycles");
    check(!busy && !done && !osc_en, "back to idle");
  endtask

  initial begin
    rst_n = 1'b1;
    #1;
    rst_n = 1'b0;
    start = 1'b0;
    repeat (3) @(posedge clk);
    check(!osc_en && !busy && !done && !run_start, "reset state");
    @(negedge clk);
    rst_n = 1'b1;
    one_restart(3, 1'b0);
    one_restart(0, 1'b1);
    one_restart(7, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
