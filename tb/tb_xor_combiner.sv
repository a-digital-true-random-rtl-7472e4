// tb_xor_combiner -- self-checking test of xor_combiner.
// Several instances with different sizes are fed random bits every cycle. The
// expected output is the XOR of all inputs from LAT cycles earlier, where LAT
// is the number of LUT-group levels worked out by hand for each size
// (20 bits in groups of 6: 20 -> 4 -> 1, two levels; 36: two; 37: three;
// 50: three; 1: none; 7 in groups of 2: 7 -> 4 -> 2 -> 1, three).
module tb_xor_combiner;
  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NCFG = 6;
  localparam int N   [NCFG] = '{20, 36, 37, 50, 1, 7};
  localparam int G   [NCFG] = '{ 6,  6,  6,  6, 6, 2};
  localparam int LAT [NCFG] = '{ 2,  2,  3,  3, 0, 3};

  logic [49:0] in_bits;
  logic        in_valid;
  logic [NCFG-1:0] out_bit, out_valid;

  for (genvar c = 0; c < NCFG; c++) begin : g_dut
    xor_combiner #(.N_IN(N[c]), .GROUP(G[c])) dut (
      .clk, .rst_n,
      .in_bits  (in_bits[N[c]-1:0]),
      .in_valid,
      .out_bit  (out_bit[c]),
      .out_valid(out_valid[c])
    );
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // History of the expected XOR and valid per configuration, newest first.
  logic [NCFG-1:0] hist_x [8];
  logic            hist_v [8];

  initial begin
    rst_n    = 1'b1;
    #1;
    rst_n    = 1'b0;
    in_bits  = '0;
    in_valid = 1'b0;
    for (int i = 0; i < 8; i++) begin
      hist_x[i] = '0;
      hist_v[i] = 1'b0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      in_bits  = 50'({$urandom, $urandom});
      in_valid = ($urandom % 3) != 0;
      // Shift the history and add the combinational XOR of the new inputs.
      for (int i = 7; i > 0; i--) begin
        hist_x[i] = hist_x[i-1];
        hist_v[i] = hist_v[i-1];
      end
      for (int c = 0; c < NCFG; c++) begin
        logic x;
        x = 1'b0;
        for (int b = 0; b < N[c]; b++) x ^= in_bits[b];
        hist_x[0][c] = x;
      end
      hist_v[0] = in_valid;
      // LAT = 0 is combinational: check before the edge.
      #1;
      for (int c = 0; c < NCFG; c++)
        if (LAT[c] == 0) begin
          check(out_bit[c] == hist_x[0][c], "combinational output");
          check(out_valid[c] == hist_v[0], "combinational valid");
        end
      @(posedge clk);
      #1;
      // After the edge, registered configurations show the value from LAT
      // edges ago: history index LAT-1 (index 0 was captured at this edge).
      for (int c = 0; c < NCFG; c++)
        if (LAT[c] > 0 && cyc >= LAT[c]) begin
          check(out_bit[c] == hist_x[LAT[c]-1][c], $sformatf("cfg %0d data", c));
          check(out_valid[c] == hist_v[LAT[c]-1], $sformatf("cfg %0d valid", c));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
