// tb_garo -- self-checking test of the Galois ring oscillator model.
// The reference is built in the testbench from the list of exponents of the
// degree-31 feedback polynomial x^31 + x^27 + x^23 + x^21 + x^20 + x^17 +
// x^16 + x^15 + x^13 + x^10 + x^9 + x^8 + x^6 + x^5 + x^4 + x^3 + x + 1:
// stage 0 takes the inverted last stage, stage i the inverted XOR of stage
// i-1 with the last stage where x^i is a term. A jitter-free instance is
// probed in the middle of every step and compared with the reference; this is
// repeated after a restart, which must reproduce the sequence. A jittered
// instance must hold 1 while disabled and keep toggling while enabled.
module tb_garo;
  localparam int DEG  = 31;
  localparam int STEP = 400;
  localparam int EXPS [18] = '{31, 27, 23, 21, 20, 17, 16, 15, 13, 10, 9, 8, 6, 5, 4, 3, 1, 0};

  logic en = 1'b0;
  logic q_det, q_jit;
  int   checks = 0, failures = 0;

  garo #(.STEP_PS(STEP), .JITTER_PS(0)) u_det (.en, .asr_out(q_det));
  garo #(.STEP_PS(STEP), .JITTER_PS(6)) u_jit (.en, .asr_out(q_jit));

  initial begin : watchdog
    #50us;
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

  logic [DEG-1:0] taps;
  int             jit_toggles;
  always @(q_jit) if (en) jit_toggles++;

  task automatic run_once(input int run);
    logic [DEG-1:0] s, n;
    int             ones;
    s = '1;
    ones = 0;
    jit_toggles = 0;
    for (int i = 0; i < 10; i++) begin
      #9ns;
      check(q_det == 1'b1 && q_jit == 1'b1, "held at 1 while disabled");
    end
    #10ns;
    en = 1'b1;
    // Step k happens at t0 + 1 + k*STEP ps; probe half a step later.
    #1ps;
    #(STEP / 2 * 1ps);
    for (int k = 1; k <= 3000; k++) begin
      #(STEP * 1ps);
      n[0] = ~s[DEG-1];
      for (int i = 1; i < DEG; i++) n[i] = ~(s[i-1] ^ (taps[i] & s[DEG-1]));
      s = n;
      check(q_det == s[DEG-1], $sformatf("run %0d step %0d", run, k));
      ones += int'(q_det);
    end
    check(ones > 1000 && ones < 2000, "output is balanced-ish");
    check(jit_toggles > 500, "jittered instance oscillates");
    en = 1'b0;
    #1ps;
    check(q_det == 1'b1 && q_jit == 1'b1, "forced to 1 when disabled");
  endtask

  initial begin
    taps = '0;
    foreach (EXPS[e]) if (EXPS[e] < DEG) taps[EXPS[e]] = 1'b1;
    run_once(0);
    run_once(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
