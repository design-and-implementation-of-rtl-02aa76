// dac_scaler: converts a wide signed sample to the 8-bit code of a DAC.
//
// The original set-up drives an 8-bit DAC with the filter input and another
// with the filter output so both can be watched on an oscilloscope. This
// block divides the signed input by 2^SHIFT (arithmetic shift), saturates the
// result to [-128, 127] and adds 128, giving an offset-binary code (0 is the
// most negative value, 128 is zero). The code is registered: one clock of
// latency. The shift, the offset-binary format and the synchronous,
// active-low reset (code 128, i.e. zero) are choices of this implementation.
// With SHIFT = 9 the noise-free peak of the 300-tap filter output,
// 300 * 14 * 14 = 58800, maps to 128 + 114.
module dac_scaler
  import dmf_pkg::*;
#(
  parameter int unsigned IW    = ACC_W,
  parameter int unsigned SHIFT = 9
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [IW-1:0] din,
  output logic [7:0]           code
);

  logic signed [IW-1:0] shifted;
  sample_t              clipped;

  always_comb begin
    shifted = din >>> SHIFT;
    if (shifted > IW'(127))       clipped = 8'sd127;
    else if (shifted < -IW'(128)) clipped = -8'sd128;
    else                          clipped = sample_t'(shifted);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) code <= 8'd128;
    else        code <= {~clipped[7], clipped[6:0]};
  end

endmodule
