// dmf: time-domain digital matched filter, Y(n) = sum_{m=0}^{M-1} S(n-m) H(m).
//
// The input samples S enter a shift register that moves every clock, so tap m
// holds S(n-m). A second shift register takes the reference samples while
// ref_shift (the "Single M" window) is high and then holds them; after exactly
// M shifts its tap m holds the reference sample taken m clocks before the end
// of the window, i.e. the time-reversed reference, which makes the convolution
// a matched filter. All M products are formed in parallel by 9x9 multipliers
// and summed by a 300-input adder, so one complete convolution is produced
// every clock (one per 20 ns sample at 50 MHz), as in the original design.
//
// Timing: a sample applied to x_in before clock edge k enters the input
// register at edge k, its products are registered at edge k+1 and the sum at
// edge k+2: y_out shows it DMF_LATENCY = 3 clocks after it was applied. The
// two pipeline registers are choices of this implementation; the original
// forms the sum within the sample period. Reset is synchronous and active low.
module dmf
  import dmf_pkg::*;
#(
  parameter int unsigned M  = M_TAPS,
  parameter int unsigned DW = DATA_W,
  parameter int unsigned MW = MULT_W,
  parameter int unsigned PW = PROD_W,
  parameter int unsigned AW = ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] x_in,
  input  logic signed [DW-1:0] ref_in,
  input  logic                 ref_shift,
  output logic signed [AW-1:0] y_out
);

  logic signed [DW-1:0] s_taps [M];  // S(n-m)
  logic signed [DW-1:0] h_taps [M];  // H(m)
  logic signed [PW-1:0] prods  [M];

  sample_shift_register #(.M(M), .DW(DW)) u_input_sr (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_en(1'b1),
    .d       (x_in),
    .taps    (s_taps)
  );

  sample_shift_register #(.M(M), .DW(DW)) u_ref_sr (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_en(ref_shift),
    .d       (ref_in),
    .taps    (h_taps)
  );

  multiplier_array #(.M(M), .DW(DW), .MW(MW), .PW(PW)) u_mult (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (s_taps),
    .b    (h_taps),
    .p    (prods)
  );

  adder_tree #(.M(M), .PW(PW), .AW(AW)) u_add (
    .clk  (clk),
    .rst_n(rst_n),
    .p    (prods),
    .sum  (y_out)
  );

endmodule
