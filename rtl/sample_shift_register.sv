// sample_shift_register: M-stage shift register of signed samples with every
// stage visible as a tap.
//
// On each clock with shift_en high, d enters stage 0 and every stage moves one
// place up, so taps[m] holds the sample that entered m shifts ago. The matched
// filter uses two of these, as in the original design (2 x 300 registers of
// 8 bits): one that shifts every sample period and holds S(n-m), and one that
// shifts only during the reference window and then holds H(m) still. The shift
// enable and the synchronous, active-low reset that clears every stage are
// choices of this implementation.
module sample_shift_register
  import dmf_pkg::*;
#(
  parameter int unsigned M  = M_TAPS,
  parameter int unsigned DW = DATA_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift_en,
  input  logic signed [DW-1:0] d,
  output logic signed [DW-1:0] taps [M]
);

  logic signed [DW-1:0] stage_q [M];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < int'(M); m++) stage_q[m] <= '0;
    end else if (shift_en) begin
      stage_q[0] <= d;
      for (int m = 1; m < int'(M); m++) stage_q[m] <= stage_q[m-1];
    end
  end

  assign taps = stage_q;

endmodule
