// ddfs_square: direct digital frequency synthesizer of the square pulse train.
//
// A 32-bit phase accumulator advances by the frequency code every clock, so
// the pulse repetition frequency is F_clk * freq_code / 2^32. The pulse is on
// while the accumulator's top bit is 0, which gives a pulse width of half the
// period (tau_s = T/2). With the original design's code 7158278 at 50 MHz the
// period is 12 us = 600 samples and the pulse 6 us = 300 samples. The code is
// 2^32/600 rounded down, so the very first pulse after reset lasts 301
// samples and one period in about fourteen thousand lasts 601; every other
// pulse is exactly 300 on and 300 off.
//
// Outputs are registered: sample is AMP during the pulse and 0 outside it
// (a unipolar pulse, as in S(t) = 1 for 0 <= t <= tau_s), and pulse_start is
// high with the first sample of each pulse, including the first one after
// reset. The amplitude AMP, the choice of the top bit and the synchronous,
// active-low reset (phase back to 0) are choices of this implementation.
module ddfs_square
  import dmf_pkg::*;
#(
  parameter int unsigned N_ACC = PHASE_W,
  parameter int          AMP   = SIG_AMP
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_ACC-1:0] freq_code,
  output sample_t          sample,
  output logic             pulse_start
);

  logic [N_ACC-1:0] phase_q;
  logic             msb_prev_q;
  logic             pulse_on;

  assign pulse_on = ~phase_q[N_ACC-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q     <= '0;
      msb_prev_q  <= 1'b1;   // so the first sample after reset starts a pulse
      sample      <= '0;
      pulse_start <= 1'b0;
    end else begin
      phase_q     <= phase_q + freq_code;
      msb_prev_q  <= phase_q[N_ACC-1];
      sample      <= pulse_on ? sample_t'(AMP) : '0;
      pulse_start <= pulse_on & msb_prev_q;
    end
  end

endmodule
