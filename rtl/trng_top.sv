// trng_top -- combined ring-oscillator TRNG with a Galois ring oscillator as
// auxiliary source of randomness (ASR).
//
// K free-running ring oscillators (ring_oscillator) each give a weakly random
// bit stream. Every oscillator output is XORed with the output of a GARO of
// degree 31 (garo), which perturbs all of them with a further, fast-changing
// signal. The GARO output reaches the K XOR gates through routing of
// different lengths (asr_fanout); without that skew the same ASR level would
// cancel in the final XOR whenever K is even. The K results are sampled by D flip-flops on the 100 MHz
// sampling clock f_L (perturb_sampler). The sampled bits are XOR-combined in
// LUT-sized groups of GROUP bits, registered level by level until one bit is
// left (xor_combiner): with K = 20 and GROUP = 6 the first bit appears three
// clock periods after the first sample edge. Every j-th bit of that sequence
// is kept (decimator, j = decim_j at run time, to be set to at least the
// measured m_min) and the kept bits are packed into bytes and queued for the
// USB 2.0 link to the host (out_buffer).
//
// All rings are built from NAND gates controlled by one enable, so the whole
// generator restarts from identical initial conditions on every trigger
// (restart_ctrl): `start` runs the rings for BITS_PER_RESTART samples, then
// stops them, flushes the last partial byte and pulses `done`.
//
// Ports (synchronous to clk unless noted)
//   clk                   sampling clock f_L from the quartz oscillator
//   rst_n                 active-low asynchronous reset
//   start                 restart trigger; busy/done report progress
//   decim_j               keep every decim_j-th bit (0 and 1: keep all)
//   rnd_bit, rnd_valid    decimated random bits, for on-chip use
//   usb_data/valid/ready  byte stream to the USB interface (not part of this RTL)
//   overflow              sticky: a byte was lost because the buffer was full;
//                         cleared by the next start
//
// The ring oscillators, the GARO and the ASR routing are behavioural models, so the
// top as a whole simulates but only the digital part around them synthesizes.
// Oscillator timing parameters are this design's own choice; K, GROUP, the
// polynomial, f_L and the 20000-bit restart length follow the reference
// implementation.
module trng_top
  import trng_pkg::*;
#(
  parameter int unsigned K                = DEFAULT_K,
  parameter int unsigned GROUP            = DEFAULT_GROUP,
  parameter int unsigned ASR_DEG          = POLY6_DEG,
  parameter poly_t       ASR_POLY         = POLY6,
  parameter int unsigned BITS_PER_RESTART = DEFAULT_BITS_PER_RESTART,
  parameter int unsigned OFF_CYCLES       = 16,
  parameter int unsigned FIFO_DEPTH       = 4096,
  parameter int unsigned J_W              = 16,
  parameter int unsigned RO_HALF_BASE_PS  = 1400,
  parameter int unsigned RO_HALF_STEP_PS  = 52,
  parameter int unsigned RO_JITTER_PS     = 10,
  parameter int unsigned ASR_STEP_PS      = 400,
  parameter int unsigned ASR_JITTER_PS    = 4,
  parameter int unsigned ASR_ROUTE_BASE_PS = 100,
  parameter int unsigned ASR_ROUTE_STEP_PS = 38
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [J_W-1:0]                 decim_j,
  output logic                           busy,
  output logic                           done,
  output logic                           rnd_bit,
  output logic                           rnd_valid,
  output logic [7:0]                     usb_data,
  output logic                           usb_valid,
  input  logic                           usb_ready,
  output logic                           overflow,
  output logic [$clog2(FIFO_DEPTH):0]    buf_level
);

  // The off time must cover the sampling, combining and decimating registers
  // so that the last bit of a run reaches the buffer before the flush.
  if (OFF_CYCLES < xor_levels(K, GROUP) + 2) begin : g_bad_off
    $error("trng_top: OFF_CYCLES too short for the pipeline");
  end

  logic         osc_en, run_start;
  logic [K-1:0] ro;
  logic         asr;
  logic [K-1:0] asr_k;
  logic [K-1:0] sample;
  logic         sample_valid;
  logic         comb_bit, comb_valid;

  restart_ctrl #(
    .BITS_PER_RESTART(BITS_PER_RESTART),
    .OFF_CYCLES      (OFF_CYCLES)
  ) u_restart (
    .clk, .rst_n, .start,
    .osc_en, .run_start, .busy, .done
  );

  for (genvar k = 0; k < K; k++) begin : g_ro
    ring_oscillator #(
      .HALF_PERIOD_PS(RO_HALF_BASE_PS + k * RO_HALF_STEP_PS),
      .JITTER_PS     (RO_JITTER_PS)
    ) u_ro (
      .en    (osc_en),
      .ro_out(ro[k])
    );
  end

  garo #(
    .DEG      (ASR_DEG),
    .POLY     (ASR_POLY),
    .STEP_PS  (ASR_STEP_PS),
    .JITTER_PS(ASR_JITTER_PS)
  ) u_asr (
    .en     (osc_en),
    .asr_out(asr)
  );

  asr_fanout #(
    .K      (K),
    .BASE_PS(ASR_ROUTE_BASE_PS),
    .STEP_PS(ASR_ROUTE_STEP_PS)
  ) u_asr_net (
    .asr,
    .asr_k
  );

  perturb_sampler #(.K(K)) u_sampler (
    .clk, .rst_n,
    .ro,
    .asr   (asr_k),
    .en_in (osc_en),
    .sample,
    .valid (sample_valid)
  );

  xor_combiner #(.N_IN(K), .GROUP(GROUP)) u_combiner (
    .clk, .rst_n,
    .in_bits  (sample),
    .in_valid (sample_valid),
    .out_bit  (comb_bit),
    .out_valid(comb_valid)
  );

  decimator #(.J_W(J_W)) u_decim (
    .clk, .rst_n,
    .clear    (run_start),
    .j        (decim_j),
    .in_bit   (comb_bit),
    .in_valid (comb_valid),
    .out_bit  (rnd_bit),
    .out_valid(rnd_valid)
  );

  out_buffer #(.DEPTH(FIFO_DEPTH)) u_buffer (
    .clk, .rst_n,
    .in_bit        (rnd_bit),
    .in_valid      (rnd_valid),
    .flush         (done),
    .out_data      (usb_data),
    .out_valid     (usb_valid),
    .out_ready     (usb_ready),
    .overflow,
    .clear_overflow(start && !busy),
    .level         (buf_level)
  );

endmodule
