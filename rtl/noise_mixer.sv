// noise_mixer: adds scaled pseudo-noise to the square pulse to set the input
// signal-to-noise ratio of the matched filter.
//
// The original design tests the filter with noise whose amplitude is 100%,
// 200%, 300% and 800% of the pulse amplitude (SNR_INP = 1/1, 1/2, 1/3, 1/8).
// Here the signed noise word r in [-128, 127] is scaled to a peak of k * AMP
// as (r * k * AMP) >>> 7, with k = 0, 1, 2, 3 or 8 chosen by snr_sel, and
// added to the pulse sample. The sum is saturated to the signed 8-bit DMF
// input word and registered (one clock of latency); saturated flags a clipped
// sample. With the default AMP = 14 the sum never exceeds 126 and never
// clips. The scaling rule, the saturation and the synchronous, active-low
// reset are choices of this implementation.
module noise_mixer
  import dmf_pkg::*;
#(
  parameter int AMP = SIG_AMP
) (
  input  logic     clk,
  input  logic     rst_n,
  input  sample_t  signal_in,
  input  sample_t  noise_in,
  input  snr_sel_e snr_sel,
  output sample_t  mix_out,
  output logic     saturated
);

  localparam int SUM_W = 20;

  logic signed [SUM_W-1:0] scale;
  logic signed [SUM_W-1:0] scaled_noise;
  logic signed [SUM_W-1:0] sum;
  logic                    clip_hi, clip_lo;

  always_comb begin
    scale        = SUM_W'(noise_multiple(snr_sel)) * SUM_W'(AMP);
    scaled_noise = (SUM_W'(noise_in) * scale) >>> 7;
    sum          = SUM_W'(signal_in) + scaled_noise;
    clip_hi      = sum > SUM_W'(127);
    clip_lo      = sum < -SUM_W'(128);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mix_out   <= '0;
      saturated <= 1'b0;
    end else begin
      mix_out   <= clip_hi ? sample_t'(127) :
                   clip_lo ? sample_t'(-128) : sample_t'(sum);
      saturated <= clip_hi | clip_lo;
    end
  end

endmodule
