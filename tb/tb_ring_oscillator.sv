// tb_ring_oscillator -- self-checking test of the ring oscillator model.
// A jitter-free instance must hold 1 while disabled, give its first edge
// 1 ps + one half period after the enable rises and then toggle exactly every
// half period, and do the same again after a restart. A jittered instance
// must keep every half period within the jitter bounds, must actually vary,
// and must also hold 1 while disabled.
module tb_ring_oscillator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int HALF = 1400;
  localparam int JIT  = 10;

  logic en = 1'b0;
  logic q_det, q_jit;
  int   checks = 0, failures = 0;

  ring_oscillator #(.HALF_PERIOD_PS(HALF), .JITTER_PS(0))   u_det (.en, .ro_out(q_det));
  ring_oscillator #(.HALF_PERIOD_PS(HALF), .JITTER_PS(JIT)) u_jit (.en, .ro_out(q_jit));

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

  function automatic longint ps_now();
    return longint'($time);
  endfunction

  // Edge times of both oscillators, in ps.
  longint det_edges[$], jit_edges[$];
  always @(q_det) if (en) det_edges.push_back(ps_now());
  always @(q_jit) if (en) jit_edges.push_back(ps_now());

  task automatic run_once(input int run);
    longint t0;
    int     distinct;
    longint prev;
    det_edges.delete();
    jit_edges.delete();
    // Disabled: both outputs stay at 1.
    for (int i = 0; i < 20; i++) begin
      #7ns;
      check(q_det == 1'b1 && q_jit == 1'b1, "held at 1 while disabled");
    end
    #10ns;
    en = 1'b1;
    t0 = ps_now();
    #2us;
    // Deterministic instance: edge n at t0 + 1 + n*HALF.
    check(det_edges.size() >= 1000, "enough deterministic edges");
    for (int n = 0; n < det_edges.size(); n++)
      check(det_edges[n] == t0 + 1 + longint'(n + 1) * HALF,
            $sformatf("run %0d det edge %0d time %0d exp %0d", run, n, det_edges[n], t0 + 1 + longint'(n + 1) * HALF));
    // Jittered instance: bounds and variation.
    check(jit_edges.size() >= 1000, "enough jittered edges");
    prev = t0 + 1;
    distinct = 0;
    for (int n = 0; n < jit_edges.size(); n++) begin
      longint d;
      d = jit_edges[n] - prev;
      check(d >= HALF - JIT && d <= HALF + JIT, "jittered half period in bounds");
      if (d != HALF) distinct++;
      prev = jit_edges[n];
    end
    check(distinct > jit_edges.size() / 2, "jitter present");
    en = 1'b0;
    #1ps;
    check(q_det == 1'b1 && q_jit == 1'b1, "forced to 1 when disabled");
  endtask

  initial begin
    run_once(0);
    run_once(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
