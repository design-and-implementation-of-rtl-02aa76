// dmf_system: complete square-pulse matched-filter test set-up on one FPGA.
//
// A direct digital synthesizer (ddfs_square) makes the square pulse train
// (6 us pulses every 12 us at 50 MHz with the default frequency code), a
// 60-bit pseudo-noise generator (dpng) makes the noise, and noise_mixer adds
// them at the selected input SNR (off, 1/1, 1/2, 1/3, 1/8) to form the signed
// 8-bit filter input. The clean pulse is the reference: single_m_ctrl opens
// a window of M = 300 samples at the start of the first pulse after reset (or
// after reload) and the matched filter (dmf) shifts those samples into its
// reference register. The filter then correlates every incoming sample with
// that pulse; its output is a triangle twice the pulse width, peaking at the
// end of each received pulse, with a processing gain of 10 log10(300), about
// 25 dB. Filter input and output are also given as 8-bit offset-binary DAC
// codes for an oscilloscope.
//
// Timing: dmf_in lags the synthesizer by one clock (mixer register), dmf_out
// lags dmf_in by 3 clocks, and each DAC code lags its signal by one clock.
// The structure follows the original design; the amplitude, the scaling to
// DAC codes and the way the reference window is triggered are choices of this
// implementation. Reset is synchronous and active low.
module dmf_system
  import dmf_pkg::*;
#(
  parameter int unsigned M = M_TAPS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PHASE_W-1:0]      freq_code,
  input  logic [2:0]              snr_sel,
  input  logic                    reload,
  output logic [7:0]              dac_in_code,
  output logic [7:0]              dac_out_code,
  output logic signed [DATA_W-1:0] dmf_in,
  output logic signed [ACC_W-1:0]  dmf_out,
  output logic                    ref_valid
);

  sample_t pulse_sample;
  sample_t noise;
  logic    pulse_start;
  logic    single_m;
  logic    mix_saturated;

  ddfs_square u_ddfs (
    .clk        (clk),
    .rst_n      (rst_n),
    .freq_code  (freq_code),
    .sample     (pulse_sample),
    .pulse_start(pulse_start)
  );

  dpng u_dpng (
    .clk  (clk),
    .rst_n(rst_n),
    .noise(noise),
    .state()
  );

  noise_mixer u_mix (
    .clk      (clk),
    .rst_n    (rst_n),
    .signal_in(pulse_sample),
    .noise_in (noise),
    .snr_sel  (snr_sel_e'(snr_sel)),
    .mix_out  (dmf_in),
    .saturated(mix_saturated)
  );

  single_m_ctrl #(.M(M)) u_single_m (
    .clk        (clk),
    .rst_n      (rst_n),
    .reload     (reload),
    .pulse_start(pulse_start),
    .single_m   (single_m),
    .ref_valid  (ref_valid)
  );

  dmf #(.M(M)) u_dmf (
    .clk      (clk),
    .rst_n    (rst_n),
    .x_in     (dmf_in),
    .ref_in   (pulse_sample),
    .ref_shift(single_m),
    .y_out    (dmf_out)
  );

  dac_scaler #(.IW(DATA_W), .SHIFT(0)) u_dac_in (
    .clk  (clk),
    .rst_n(rst_n),
    .din  (dmf_in),
    .code (dac_in_code)
  );

  dac_scaler #(.IW(ACC_W), .SHIFT(9)) u_dac_out (
    .clk  (clk),
    .rst_n(rst_n),
    .din  (dmf_out),
    .code (dac_out_code)
  );

  // With the default amplitude the mixer can never clip
  property p_no_clip;
    @(posedge clk) disable iff (!rst_n) !mix_saturated;
  endproperty
  assert property (p_no_clip);

endmodule
