// trng_workload_unit -- runs one trng_top configuration through one restart
// and checks it, for the workload testbench.
//
// It instantiates trng_top with K source oscillators, XOR groups of GROUP
// bits (one LUT) and a shortened run of
// NB samples, triggers one restart with every J-th bit kept, and checks:
// the kept bits and the bytes at the USB side against trng_ref_monitor, the
// number of kept bits (NB / J), their spacing (exactly J clock cycles, i.e. an
// output rate of f_L / J), and the latency of the first combined bit (LAT
// clock periods after the enable rises). `finished` goes high at the end;
// `checks` and `failures` hold the counts.
module trng_workload_unit #(
  parameter int K     = 20,
  parameter int GROUP = 6,
  parameter int J     = 1,
  parameter int NB  = 1200,
  parameter int LAT = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  logic        start, busy, done, rbit, rval, uval, ovf;
  logic [7:0]  udata;
  logic [12:0] lvl;

  trng_top #(.K(K), .GROUP(GROUP), .BITS_PER_RESTART(NB)) dut (
    .clk, .rst_n, .start, .decim_j(16'(J)), .busy, .done,
    .rnd_bit(rbit), .rnd_valid(rval), .usb_data(udata), .usb_valid(uval),
    .usb_ready(1'b1), .overflow(ovf), .buf_level(lvl)
  );

  trng_ref_monitor #(.K(K)) mon (
    .clk, .ro(dut.ro), .asr(dut.asr_k), .osc_en(dut.osc_en),
    .run_start(dut.run_start), .done, .j(16'(J))
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL K=%0d GROUP=%0d J=%0d: %s at %0t", K, GROUP, J, what, $time);
    end
  endtask

  logic [7:0] got[$];
  longint     cyc = 0, t_en = -1, t_first = -1, t_last_rv = -1;
  int         n_rv = 0, bad_gap = 0;

  always @(posedge clk) begin
    cyc++;
    if (uval) got.push_back(udata);
    if (dut.osc_en && t_en < 0) t_en = cyc;
    if (dut.u_combiner.out_valid && t_first < 0) t_first = cyc;
    if (rval) begin
      if (t_last_rv >= 0 && cyc - t_last_rv != longint'(J)) bad_gap++;
      t_last_rv = cyc;
      n_rv++;
    end
  end

  initial begin
    checks = 0; failures = 0; finished = 1'b0; start = 1'b0;
    #2;
    @(posedge rst_n);
    repeat (3) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    repeat (10) @(negedge clk);
    check(t_first - t_en == longint'(LAT), $sformatf("latency of the first combined bit: %0d %0d, kept %0d gaps %0d", t_en, t_first, n_rv, bad_gap));
    check(n_rv == NB / J, "number of kept bits");
    check(bad_gap == 0, "kept bits exactly J cycles apart");
    check(mon.exp_q.size() == (NB / J + 7) / 8, "expected byte count");
    check(got.size() == mon.exp_q.size(), "received byte count");
    for (int i = 0; i < got.size() && i < mon.exp_q.size(); i++)
      check(got[i] == mon.exp_q[i], $sformatf("byte %0d", i));
    check(!ovf, "no overflow");
    finished = 1'b1;
  end

endmodule
