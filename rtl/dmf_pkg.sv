// dmf_pkg: shared sizes, constants and types of the square-pulse matched
// filter system.
//
// The filter length M = 300 is the number of 20 ns samples in one 6 us pulse
// (tau_s * F_sam). Samples are signed 8-bit words, multipliers are 9x9, each
// product is carried on 16 bits and the 300-input sum on 27 bits. The DDFS
// uses a 32-bit phase accumulator and the frequency code 7158278, which is
// 2^32 / (F_sam * T) rounded down for T = 12 us at 50 MHz. These numbers all
// follow the original design. The pulse amplitude (14) and the encoding of
// the noise-level selector are choices of this implementation.
package dmf_pkg;

  // Matched filter geometry
  localparam int unsigned M_TAPS   = 300;  // reference length = pulse width in samples
  localparam int unsigned DATA_W   = 8;    // signed input / reference sample
  localparam int unsigned MULT_W   = 9;    // multiplier operand width
  localparam int unsigned PROD_W   = 16;   // adder input width
  localparam int unsigned ACC_W    = 27;   // adder output width

  // Cycles from a sample at the DMF input to the output that first includes it
  localparam int unsigned DMF_LATENCY = 3;

  // Direct digital frequency synthesizer
  localparam int unsigned        PHASE_W      = 32;
  localparam logic [PHASE_W-1:0] L_SQ_DEFAULT = 32'd7158278;

  // Pseudo-noise generator
  localparam int unsigned DPNG_K = 60;

  // Pulse amplitude: largest value for which pulse + 8x noise fits 8 bits
  localparam int SIG_AMP = 14;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Input SNR cases: noise peak = k * pulse amplitude
  typedef enum logic [2:0] {
    SNR_NOISE_OFF = 3'd0,  // k = 0
    SNR_1_1       = 3'd1,  // k = 1
    SNR_1_2       = 3'd2,  // k = 2
    SNR_1_3       = 3'd3,  // k = 3
    SNR_1_8       = 3'd4   // k = 8
  } snr_sel_e;

  // Noise multiple for a selector value (unused codes give no noise)
  function automatic int unsigned noise_multiple(snr_sel_e sel);
    case (sel)
      SNR_1_1: return 1;
      SNR_1_2: return 2;
      SNR_1_3: return 3;
      SNR_1_8: return 8;
      default: return 0;
    endcase
  endfunction

endpackage
