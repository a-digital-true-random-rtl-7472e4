// tb_trng_top_full -- one complete restart of trng_top at its default sizes.
//
// K = 20 source oscillators perturbed by the degree-31 GARO, groups of six,
// 20000 samples per restart, a 4096-byte buffer. The reader is ready in two
// cycles out of three. The test checks the enable length, the three-period
// latency of the first combined bit, the restart duration, and that all 2500
// bytes delivered to the USB side equal the reference model's bytes, then
// repeats the restart with every third bit kept (834 bytes, the last one a
// flushed partial byte).
module tb_trng_top_full;
  import trng_pkg::*;

  localparam int NB  = DEFAULT_BITS_PER_RESTART;
  localparam int OFF = 16;

  logic        clk = 1'b0;
  logic        rst_n, start, ready, busy, done, rbit, rval, uval, ovf;
  logic [15:0] j;
  logic [7:0]  udata;
  logic [12:0] lvl;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    #2ms;
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

  trng_top dut (
    .clk, .rst_n, .start, .decim_j(j), .busy, .done,
    .rnd_bit(rbit), .rnd_valid(rval), .usb_data(udata), .usb_valid(uval),
    .usb_ready(ready), .overflow(ovf), .buf_level(lvl)
  );

  trng_ref_monitor #(.K(DEFAULT_K)) mon (
    .clk, .ro(dut.ro), .asr(dut.asr_k), .osc_en(dut.osc_en),
    .run_start(dut.run_start), .done, .j
  );

  logic [7:0] got[$];
  longint     cyc = 0, t_en_rise, t_first, t_done, t_start;
  int         en_len;

  always @(posedge clk) begin
    cyc++;
    if (uval && ready) got.push_back(udata);
    if (dut.osc_en) en_len++;
    if (dut.osc_en && t_en_rise < 0) t_en_rise = cyc;
    if (dut.u_combiner.out_valid && t_first < 0) t_first = cyc;
    if (done) t_done = cyc;
  end

  task automatic one_run(input int jj);
    int nbytes;
    j = 16'(jj);
    got.delete();
    mon.exp_q.delete();
    t_en_rise = -1; t_first = -1; t_done = -1; en_len = 0;
    @(negedge clk);
    start = 1'b1;
    t_start = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      ready = ($urandom % 3) != 0;
      @(negedge clk);
    end
    ready = 1'b1;
    repeat (4200) @(negedge clk);
    nbytes = (NB / jj + 7) / 8;
    check(en_len == NB, "enable length");
    check(t_first - t_en_rise == 3, "first bit three clock periods after enable");
    check(t_done - t_start == longint'(NB + OFF + 2), "restart duration");
    check(!ovf, "no overflow");
    check(mon.exp_q.size() == nbytes, "expected byte count");
    check(got.size() == nbytes, "received byte count");
    for (int i = 0; i < got.size() && i < mon.exp_q.size(); i++)
      check(got[i] == mon.exp_q[i], $sformatf("byte %0d", i));
  endtask

  initial begin
    rst_n = 1'b1;
    #1;
    rst_n = 1'b0; start = 1'b0; ready = 1'b1; j = 16'd1;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    one_run(1);
    one_run(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
