// perturb_sampler -- first stage of the combined TRNG: perturbation by the
// auxiliary source of randomness (ASR) and sampling.
//
// Every source oscillator output ro[k] is XORed with the ASR output and the
// result is captured by its own D flip-flop on the sampling clock f_L, as in
// the first column of the generator's block diagram. The ASR is one signal
// fanned out to K XOR gates; the port carries the K copies as they arrive at
// the gates, so that routing skew between them can be represented. Alongside the
// K data flip-flops one more flip-flop registers `en_in`, the oscillators'
// restart enable, so `valid` marks samples taken while the oscillators were
// running. That tag is this design's addition for the downstream logic.
//
// Interface
//   clk     sampling clock f_L (100 MHz in the reference implementation)
//   rst_n   asynchronous active-low reset of the valid tag only
//   ro      K asynchronous oscillator outputs
//   asr     asynchronous ASR output, one copy per XOR gate
//   en_in   oscillator enable, synchronous to clk
//   sample  registered ro ^ asr, one cycle after the edge that sampled it
//   valid   registered en_in
//
// The inputs are asynchronous by design: a sample may be metastable, which is
// part of the entropy source. No synchronizer is placed here on purpose.
module perturb_sampler #(
  parameter int unsigned K = trng_pkg::DEFAULT_K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] ro,
  input  logic [K-1:0] asr,
  input  logic         en_in,
  output logic [K-1:0] sample,
  output logic         valid
);

  always_ff @(posedge clk) sample <= ro ^ asr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) valid <= 1'b0;
    else        valid <= en_in;

endmodule
