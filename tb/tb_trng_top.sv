// tb_trng_top -- end-to-end test of trng_top at a reduced run length.
//
// Two generators run side by side: `dut` with the default oscillator jitter
// and `det`, whose oscillator models have no jitter. Each run's output bytes
// are compared with the reference model (trng_ref_monitor) that samples the
// oscillator and GARO outputs. The runs exercise, and the test counts:
//   - restarts (several per generator) and their cycle timing: the enable is
//     high for exactly BITS_PER_RESTART cycles, the first combined bit comes
//     three clock periods after the enable rises, done follows the off time;
//   - decimation with j = 3 (a partial last byte, so the flush is used too);
//   - USB back-pressure (random ready) and buffer overflow (reader stalled),
//     with the sticky flag cleared by the next start;
//   - perturbation by the GARO (samples taken while its output was 1, and
//     samples at which its K routed copies disagreed, so it cannot cancel);
//   - identical restarts of the jitter-free generator, and runs of the
//     jittered one that differ.
module tb_trng_top;
  import trng_pkg::*;

  localparam int NB    = 400;
  localparam int DEPTH = 32;
  localparam int OFF   = 16;

  logic        clk = 1'b0;
  logic        rst_n;
  int          checks = 0, failures = 0;

  // Counted mechanisms.
  int n_restart = 0, n_decim = 0, n_flush = 0, n_backpressure = 0;
  int n_overflow = 0, n_repeat_equal = 0, n_jitter_differ = 0;

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

  // ---------------------------------------------------------------- dut
  logic        start_a, ready_a, busy_a, done_a, rbit_a, rval_a, uval_a, ovf_a;
  logic [15:0] j_a;
  logic [7:0]  udata_a;
  logic [5:0]  lvl_a;

  trng_top #(.BITS_PER_RESTART(NB), .FIFO_DEPTH(DEPTH), .OFF_CYCLES(OFF)) dut (
    .clk, .rst_n, .start(start_a), .decim_j(j_a), .busy(busy_a), .done(done_a),
    .rnd_bit(rbit_a), .rnd_valid(rval_a), .usb_data(udata_a), .usb_valid(uval_a),
    .usb_ready(ready_a), .overflow(ovf_a), .buf_level(lvl_a)
  );

  trng_ref_monitor #(.K(DEFAULT_K)) mon_a (
    .clk, .ro(dut.ro), .asr(dut.asr_k), .osc_en(dut.osc_en),
    .run_start(dut.run_start), .done(done_a), .j(j_a)
  );

  // ---------------------------------------------------------------- det
  logic        start_b, busy_b, done_b, rbit_b, rval_b, uval_b, ovf_b;
  logic [7:0]  udata_b;
  logic [5:0]  lvl_b;

  trng_top #(.BITS_PER_RESTART(NB), .FIFO_DEPTH(DEPTH), .OFF_CYCLES(OFF),
             .RO_JITTER_PS(0), .ASR_JITTER_PS(0)) det (
    .clk, .rst_n, .start(start_b), .decim_j(16'd1), .busy(busy_b), .done(done_b),
    .rnd_bit(rbit_b), .rnd_valid(rval_b), .usb_data(udata_b), .usb_valid(uval_b),
    .usb_ready(1'b1), .overflow(ovf_b), .buf_level(lvl_b)
  );

  trng_ref_monitor #(.K(DEFAULT_K)) mon_b (
    .clk, .ro(det.ro), .asr(det.asr_k), .osc_en(det.osc_en),
    .run_start(det.run_start), .done(done_b), .j(16'd1)
  );

  // Bytes leaving each generator.
  logic [7:0] got_a[$], got_b[$];
  always @(posedge clk) begin
    if (uval_a && ready_a) got_a.push_back(udata_a);
    if (uval_a && !ready_a) n_backpressure++;
    if (uval_b) got_b.push_back(udata_b);
  end

  // Cycle counter and per-run timing of dut.
  longint cyc = 0;
  longint t_start, t_en_rise, t_first_comb, t_done;
  int     en_len;
  always @(posedge clk) begin
    cyc++;
    if (dut.osc_en) en_len++;
    if (dut.u_combiner.out_valid && t_first_comb < 0) t_first_comb = cyc;
    if (dut.osc_en && t_en_rise < 0) t_en_rise = cyc;
    if (done_a) t_done = cyc;
  end

  // One restart of dut: returns the bytes it produced (after draining).
  task automatic run_a(input int j, input int ready_mode, output logic [7:0] bytes[$]);
    int nbytes;
    j_a = 16'(j);
    got_a.delete();
    mon_a.exp_q.delete();
    ready_a = (ready_mode != 2);
    t_en_rise = -1; t_first_comb = -1; t_done = -1; en_len = 0;
    @(negedge clk);
    start_a = 1'b1;
    t_start = cyc;
    @(negedge clk);
    start_a = 1'b0;
    check(ovf_a == 1'b0, "overflow cleared by start");
    while (!done_a) begin
      if (ready_mode == 1) ready_a = ($urandom % 3) != 0;
      @(negedge clk);
    end
    @(negedge clk);
    n_restart++;
    // Timing: enable on for NB cycles; first combined bit 3 periods after
    // the enable rose; done after the off time.
    check(en_len == NB, "enable length");
    check(t_first_comb - t_en_rise == 3, "first bit three clock periods after enable");
    check(t_done - t_start == longint'(NB + OFF + 2), $sformatf("restart duration %0d", t_done - t_start));
    nbytes = (NB / j + 7) / 8;
    if (ready_mode == 2) begin
      check(ovf_a == 1'b1, "overflow with stalled reader");
      if (ovf_a) n_overflow++;
      ready_a = 1'b1;
    end else begin
      check(ovf_a == 1'b0, "no overflow");
    end
    if ((NB / j) % 8 != 0) n_flush++;
    if (j > 1) n_decim++;
    ready_a = 1'b1;
    repeat (DEPTH + 8) @(negedge clk);
    check(mon_a.exp_q.size() == nbytes, "expected byte count");
    if (ready_mode == 2) begin
      check(got_a.size() == DEPTH, "bytes kept on overflow");
    end else begin
      check(got_a.size() == nbytes, "received byte count");
    end
    for (int i = 0; i < got_a.size() && i < mon_a.exp_q.size(); i++)
      check(got_a[i] == mon_a.exp_q[i], $sformatf("byte %0d matches reference", i));
    bytes = got_a;
  endtask

  task automatic run_b(output logic [7:0] bytes[$]);
    got_b.delete();
    mon_b.exp_q.delete();
    @(negedge clk);
    start_b = 1'b1;
    @(negedge clk);
    start_b = 1'b0;
    while (!done_b) @(negedge clk);
    repeat (10) @(negedge clk);
    check(got_b.size() == NB / 8, "det byte count");
    check(got_b == mon_b.exp_q, "det bytes match reference");
    bytes = got_b;
  endtask

  initial begin
    logic [7:0] a1[$], a2[$], a3[$], a4[$], b1[$], b2[$];
    rst_n = 1'b1;
    #1;
    rst_n = 1'b0;
    start_a = 1'b0; start_b = 1'b0; ready_a = 1'b1; j_a = 16'd1;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    run_a(1, 0, a1);        // raw sequence, reader always ready
    run_a(1, 1, a2);        // raw sequence, random back-pressure
    run_a(3, 1, a3);        // every third bit: decimation and flush
    run_a(1, 2, a4);        // reader stalled: overflow
    if (a1 != a2) n_jitter_differ++;
    check(a1 != a2, "jittered restarts differ");

    run_b(b1);
    run_b(b2);
    if (b1 == b2) n_repeat_equal++;
    check(b1 == b2, "jitter-free restarts identical");

    check(mon_a.asr_high > 0 && mon_a.asr_high < 4 * NB, "GARO perturbation seen");
    check(mon_a.asr_skewed > 0, "skewed GARO copies seen");
    $display("mechanisms: restart=%0d decimation=%0d flush=%0d backpressure=%0d overflow=%0d repeat=%0d jitter=%0d asr_high=%0d asr_skewed=%0d",
             n_restart, n_decim, n_flush, n_backpressure, n_overflow, n_repeat_equal,
             n_jitter_differ, mon_a.asr_high, mon_a.asr_skewed);
    check(n_restart > 0,      "restart happened");
    check(n_decim > 0,        "decimation happened");
    check(n_flush > 0,        "flush happened");
    check(n_backpressure > 0, "back-pressure happened");
    check(n_overflow > 0,     "overflow happened");
    check(n_repeat_equal > 0, "identical restart happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
