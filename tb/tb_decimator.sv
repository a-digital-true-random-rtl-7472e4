// tb_decimator -- self-checking test of decimator.
// For several spacings j (including 0, read as 1) a random bit stream with
// random gaps and occasional restarts is fed in; the testbench counts the
// valid bits since the last restart itself and expects bit number j, 2j, 3j,
// ... of each restart, one cycle later.
module tb_decimator;
  localparam int JW = 16;

  logic          clk = 1'b0;
  logic          rst_n, clear, in_bit, in_valid, out_bit, out_valid;
  logic [JW-1:0] j;
  int            checks = 0, failures = 0;
  int            emitted = 0;

  decimator #(.J_W(JW)) dut (.*);

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

  localparam int JS [7] = '{1, 2, 3, 0, 5, 10, 28};

  initial begin
    int  nth;
    int  jj;
    logic exp_v, exp_b;
    rst_n    = 1'b1;
    #1;
    rst_n    = 1'b0;
    clear    = 1'b0;
    in_bit   = 1'b0;
    in_valid = 1'b0;
    j        = 16'd1;
    repeat (3) @(posedge clk);
    #1;
    check(!out_valid, "no output in reset");
    @(negedge clk);
    rst_n = 1'b1;
    foreach (JS[s]) begin
      j   = JW'(JS[s]);
      jj  = (JS[s] == 0) ? 1 : JS[s];
      nth = 0;
      for (int cyc = 0; cyc < 1500; cyc++) begin
        clear    = (cyc == 0) || ($urandom % 400 == 0);
        in_valid = ($urandom % 4) != 0;
        in_bit   = 1'($urandom);
        if (clear) nth = 0;
        exp_v = 1'b0;
        exp_b = in_bit;
        if (in_valid) begin
          nth++;
          exp_v = (nth % jj) == 0;
        end
        @(posedge clk);
        #1;
        check(out_valid == exp_v, $sformatf("j=%0d valid", JS[s]));
        if (exp_v) begin
          check(out_bit == exp_b, $sformatf("j=%0d bit", JS[s]));
          emitted++;
        end
        @(negedge clk);
      end
    end
    check(emitted > 1000, "bits were emitted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
