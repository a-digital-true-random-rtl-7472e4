// tb_perturb_sampler -- self-checking test of perturb_sampler.
// Drives random oscillator and ASR levels between clock edges and checks that
// each sample equals ro[k] ^ asr[k] as it was at the sampling edge, and that the
// valid tag is the enable delayed by one cycle (and cleared by reset).
module tb_perturb_sampler;
  localparam int unsigned K = 20;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [K-1:0] ro;
  logic [K-1:0] asr;
  logic         en_in;
  logic [K-1:0] sample;
  logic         valid;
  int           checks = 0, failures = 0;

  perturb_sampler #(.K(K)) dut (.*);

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

  logic [K-1:0] exp_sample;
  logic         exp_valid;

  initial begin
    rst_n = 1'b1;
    #1;
    rst_n = 1'b0;
    ro    = '0;
    asr   = '0;
    en_in = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    check(valid == 1'b0, "valid low in reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      ro    = K'({$urandom, $urandom});
      // Mostly one common ASR level, sometimes skewed copies.
      asr   = ($urandom % 2) ? '1 : '0;
      if ($urandom % 4 == 0) asr = K'({$urandom, $urandom});
      en_in = ($urandom % 4) != 0;
      for (int k = 0; k < K; k++) exp_sample[k] = ro[k] ^ asr[k];
      exp_valid  = en_in;
      @(posedge clk);
      #1;
      check(sample == exp_sample, "sample == ro ^ asr");
      check(valid == exp_valid, "valid follows enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
