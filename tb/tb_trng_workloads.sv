// tb_trng_workloads -- the generator configurations behind the reported
// results, each run through one (shortened) restart and checked.
//
//   K = 20, j = 3   main configuration at its best spacing: 33.33 Mbit/s
//   K = 20, j = 10  main configuration at spacing 10: 10 Mbit/s
//   K = 9,  j = 10  smallest K reported to pass at spacing 10 with the GARO
//   K = 35, j = 3   K reported for spacing 2 to 3 with the GARO
//   K = 50, j = 2   largest K of the sweep
//   K = 2,  j = 1   smallest K of the sweep with the GARO (K > 1)
//   K = 20, j = 5   with 4-input LUT groups (Spartan-3 / Virtex-4 style
//                   fabric): 20 -> 5 -> 2 -> 1, 20 Mbit/s
// The first combined bit comes 3 clock periods after the enable for
// K = 9..36 with 6-input groups (sampling plus two XOR levels), 4 for K = 50
// and for K = 20 in 4-input groups (three XOR levels), and 2 for K = 2 (one
// XOR level).
module tb_trng_workloads;
  logic clk = 1'b0;
  logic rst_n;

  always #5 clk = ~clk;

  localparam int N = 7;
  localparam int KS  [N] = '{20, 20,  9, 35, 50, 2, 20};
  localparam int GS  [N] = '{ 6,  6,  6,  6,  6, 6,  4};
  localparam int JS  [N] = '{ 3, 10, 10,  3,  2, 1,  5};
  localparam int LS  [N] = '{ 3,  3,  3,  3,  4, 2,  4};

  logic [N-1:0] fin;
  int           c [N];
  int           f [N];

  for (genvar i = 0; i < N; i++) begin : g_unit
    trng_workload_unit #(.K(KS[i]), .GROUP(GS[i]), .J(JS[i]), .NB(1200), .LAT(LS[i])) u (
      .clk, .rst_n, .finished(fin[i]), .checks(c[i]), .failures(f[i])
    );
  end

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1;
    #1;
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (fin == '1);
    for (int i = 0; i < N; i++) begin
      checks   += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
