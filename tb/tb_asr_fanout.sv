// tb_asr_fanout -- self-checking test of the ASR routing model.
// The input toggles at random intervals, some shorter than the longest
// delay. Every copy k must reproduce every input edge, in order, exactly
// BASE + k*STEP picoseconds later.
module tb_asr_fanout;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int K    = 8;
  localparam int BASE = 100;
  localparam int STEP = 38;

  logic         asr = 1'b1;
  logic [K-1:0] asr_k;
  int           checks = 0, failures = 0;

  asr_fanout #(.K(K), .BASE_PS(BASE), .STEP_PS(STEP)) dut (.*);

  initial begin : watchdog
    #1ms;
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

  longint in_t[$];
  logic   in_v[$];
  longint out_t[K][$];
  logic   out_v[K][$];

  always @(asr) if ($time > 0) begin
    in_t.push_back($time);
    in_v.push_back(asr);
  end

  for (genvar k = 0; k < K; k++) begin : g_mon
    always @(asr_k[k]) if ($time > 0) begin
      out_t[k].push_back($time);
      out_v[k].push_back(asr_k[k]);
    end
  end

  initial begin
    #1001;
    for (int i = 0; i < 500; i++) begin
      asr = ~asr;
      #(2 * (50 + $urandom % 200));
    end
    #2000;
    for (int k = 0; k < K; k++) begin
      check(out_t[k].size() == in_t.size(), $sformatf("copy %0d edge count", k));
      for (int i = 0; i < in_t.size() && i < out_t[k].size(); i++) begin
        check(out_t[k][i] == in_t[i] + longint'(BASE + k * STEP), $sformatf("copy %0d edge %0d time", k, i));
        check(out_v[k][i] == in_v[i], $sformatf("copy %0d edge %0d value", k, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
