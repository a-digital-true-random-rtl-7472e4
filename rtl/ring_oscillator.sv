// ring_oscillator -- behavioural model of one source ring oscillator (RO).
//
// This is a simulation model, not synthesizable logic: a real RO is a
// combinational loop whose frequency and jitter come from the silicon.
// In the generator each RO is a single inverting gate closed through a delay
// element tau built from one transparent latch. The inverter is a NAND gate
// whose second input is the restart enable, so that every run starts from
// the same state: while `en` is low the NAND output is forced to 1 and the
// loop is frozen; when `en` rises the loop starts to oscillate.
//
// Interface
//   en      restart enable (the NAND gate's control input), active high
//   ro_out  oscillator output; 1 while disabled
//
// Timing model (this design's own choice; the source gives no gate delays):
// the gate and latch delays are lumped into one half period HALF_PERIOD_PS.
// Each half period is drawn independently and uniformly from
// HALF_PERIOD_PS +/- JITTER_PS in 2 ps steps, which is the random phase jitter
// the generator harvests. The first edge comes 1 ps + one half period after
// `en` rises and every later delay is an even number of picoseconds, so with
// an enable and a sampling clock on whole nanoseconds an oscillator edge never
// coincides with a clock edge. HALF_PERIOD_PS and JITTER_PS must be even, and
// JITTER_PS smaller than HALF_PERIOD_PS. With JITTER_PS = 0 the model is
// fully deterministic and every restart reproduces the same waveform.
module ring_oscillator #(
  parameter int unsigned HALF_PERIOD_PS = 1400,
  parameter int unsigned JITTER_PS      = 10
) (
  input  logic en,
  output logic ro_out
);

  // Delays below are whole picoseconds.
  timeunit 1ps;
  timeprecision 1ps;

  logic phase;

  initial phase = 1'b1;

  // Length of the next half period in picoseconds.
  function automatic int unsigned next_half();
    return HALF_PERIOD_PS - JITTER_PS + 2 * ($urandom % (JITTER_PS + 1));
  endfunction

  always begin
    if (!en) begin
      phase = 1'b1;
      @(posedge en);
      #1;
    end
    #(next_half());
    if (en) phase = ~phase;
  end

  // NAND output: forced high while the restart enable is low.
  assign ro_out = en ? phase : 1'b1;

endmodule
