// dpng: digital pseudo-noise generator.
//
// A K-bit shift register, clocked at the sample rate, shifts one place each
// clock; the bit entering stage 0 is the XNOR (an XOR followed by a NOT) of
// stages K-1 and K-2, i.e. the maximal-length polynomial x^K + x^(K-1) + 1.
// The sequence therefore repeats after 2^K - 1 clocks: for the original
// design's K = 60 that is about 731 years at 50 MHz. With XNOR feedback the
// all-ones state is the one that locks up. The default seed is an arbitrary
// pattern of mixed ones and zeros: this sparse feedback spreads a seed of
// long runs (such as all zeros) only slowly, and the output would start with
// thousands of strongly biased samples.
// The noise is the binary pseudo-random sequence itself: the newest bit
// becomes a full-scale signed word, +127 for a one and -128 for a zero. A
// binary maximal-length sequence is white (its autocorrelation is flat away
// from lag 0), which a word made of several adjacent register bits is not:
// successive such words are strongly anti-correlated and nearly cancel in the
// filter's 300-sample sum.
//
// The shift register length and the XOR/NOT feedback follow the original
// design. The tap positions, the seed, and the mapping of bits to noise words are
// choices of this implementation; the taps are maximal only for K in
// {15, 22, 60} among the sizes that can supply an 8-bit word. Reset is
// synchronous and active low and loads SEED.
module dpng
  import dmf_pkg::*;
#(
  parameter int unsigned K    = DPNG_K,
  parameter logic [K-1:0] SEED = K'(64'h0A5C_39E1_F0B7_6D24)
) (
  input  logic         clk,
  input  logic         rst_n,
  output sample_t      noise,
  output logic [K-1:0] state
);

  logic feedback;

  assign feedback = ~(state[K-1] ^ state[K-2]);

  always_ff @(posedge clk) begin
    if (!rst_n) state <= SEED;
    else        state <= {state[K-2:0], feedback};
  end

  assign noise = {~state[0], {(DATA_W-1){state[0]}}};

  // The XNOR register must never reach its lock-up state
  property p_no_lockup;
    @(posedge clk) disable iff (!rst_n) state != '1;
  endproperty
  assert property (p_no_lockup);

endmodule
