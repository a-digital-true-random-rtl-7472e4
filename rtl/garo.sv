// garo -- behavioural model of the Galois ring oscillator (GARO) used as the
// auxiliary source of randomness (ASR).
//
// This is a simulation model, not synthesizable logic: a GARO is a
// combinational loop. It is built like a Galois LFSR with feedback polynomial
// f(x) = x^DEG + c_{DEG-1} x^{DEG-1} + ... + c_1 x + 1, but every flip-flop
// is replaced by an inverting gate. Stage 0 is driven by the inverted
// output of the last stage; stage i (1 <= i < DEG) inverts the XOR of stage
// i-1 with the last stage wherever c_i = 1. As in the source oscillators, each
// inverter is a NAND gate whose other input is the restart enable, so while
// `en` is low every stage sits at 1 and each run starts from the all-ones
// state. The default polynomial is the degree-31 POLY6 of trng_pkg.
//
// Interface
//   en       restart enable, active high
//   asr_out  output of the last stage (stage DEG-1); 1 while disabled
//
// Timing model (this design's own choice; the source gives no gate delays):
// all stages switch together once per stage delay, i.e. every stage is given
// the same delay STEP_PS, drawn for each step from STEP_PS +/- JITTER_PS in
// 2 ps steps. The first step comes 1 ps + one step after `en` rises and all
// later delays are even picoseconds, so steps never coincide with a sampling
// clock on whole nanoseconds. STEP_PS and JITTER_PS must be even. With
// JITTER_PS = 0 the model is deterministic.
module garo
  import trng_pkg::*;
#(
  parameter int unsigned DEG       = POLY6_DEG,
  parameter poly_t       POLY      = POLY6,
  parameter int unsigned STEP_PS   = 400,
  parameter int unsigned JITTER_PS = 4
) (
  input  logic en,
  output logic asr_out
);

  // Delays below are whole picoseconds.
  timeunit 1ps;
  timeprecision 1ps;

  logic [DEG-1:0] stage;

  initial stage = '1;

  // One simultaneous switching step of all stages.
  function automatic logic [DEG-1:0] step(logic [DEG-1:0] s);
    logic [DEG-1:0] n;
    n[0] = ~s[DEG-1];
    for (int i = 1; i < DEG; i++) n[i] = ~(s[i-1] ^ (POLY[i] & s[DEG-1]));
    return n;
  endfunction

  function automatic int unsigned next_step();
    return STEP_PS - JITTER_PS + 2 * ($urandom % (JITTER_PS + 1));
  endfunction

  always begin
    if (!en) begin
      stage = '1;
      @(posedge en);
      #1;
    end
    #(next_step());
    if (en) stage = step(stage);
  end

  assign asr_out = en ? stage[DEG-1] : 1'b1;

endmodule
