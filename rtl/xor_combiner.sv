// xor_combiner -- multi-level XOR combination of the sampled oscillator bits.
//
// The N_IN sampled bits are split into groups of GROUP bits (GROUP is the
// number of inputs of one LUT, 6 in the reference implementation), each group
// is reduced by XOR and the result is registered on the sampling clock. The
// group results are combined the same way, level after level, until a single
// bit remains. The number of levels is LEVELS = ceil(log_GROUP(N_IN)); for the
// default N_IN = 20 and GROUP = 6 this is 20 -> 4 -> 1, two levels. Together
// with the sampling flip-flops in front of it the generator therefore delivers
// its first bit three clock periods after the first sample edge.
// The last group of a level takes whatever bits are left over (20 = 6+6+6+2).
// A valid tag travels with the data through the same number of registers.
//
// Interface
//   clk, rst_n  sampling clock; active-low asynchronous reset of the tags
//   in_bits     N_IN bits, in_valid their tag
//   out_bit     XOR of all N_IN inputs, LEVELS cycles later; out_valid its tag
// With N_IN = 1 the block is a wire (LEVELS = 0).
module xor_combiner
  import trng_pkg::*;
#(
  parameter int unsigned N_IN  = DEFAULT_K,
  parameter int unsigned GROUP = DEFAULT_GROUP
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_IN-1:0] in_bits,
  input  logic            in_valid,
  output logic            out_bit,
  output logic            out_valid
);

  localparam int unsigned LEVELS = xor_levels(N_IN, GROUP);

  // lvl[l] holds the bits of level l; only the low xor_width(N_IN,GROUP,l)
  // bits of a level are used, the rest stay zero.
  logic [N_IN-1:0] lvl [LEVELS+1];
  logic [LEVELS:0] vld;

  assign lvl[0] = in_bits;
  assign vld[0] = in_valid;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned W_IN  = xor_width(N_IN, GROUP, l);
    localparam int unsigned W_OUT = xor_width(N_IN, GROUP, l + 1);

    logic [W_OUT-1:0] grp;

    always_comb begin
      grp = '0;
      for (int i = 0; i < W_IN; i++) grp[i / GROUP] ^= lvl[l][i];
    end

    always_ff @(posedge clk) lvl[l+1] <= N_IN'(grp);

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) vld[l+1] <= 1'b0;
      else        vld[l+1] <= vld[l];
  end

  assign out_bit   = lvl[LEVELS][0];
  assign out_valid = vld[LEVELS];

endmodule
