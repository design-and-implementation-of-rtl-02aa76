// multiplier_array: M parallel signed multipliers, one per filter tap.
//
// Product m is a[m] * b[m]. Following the original design, each multiplier is
// 9 x 9 bits: the 8-bit signed operands are sign-extended to 9 bits (the
// native size of the FPGA's embedded multipliers) and the product is carried
// on 16 bits to the adder, which loses nothing since an 8 x 8 signed product
// always fits 16 bits. The products are registered, so p follows a and b by
// one clock; that register and its synchronous reset are choices of this
// implementation.
module multiplier_array
  import dmf_pkg::*;
#(
  parameter int unsigned M  = M_TAPS,
  parameter int unsigned DW = DATA_W,
  parameter int unsigned MW = MULT_W,
  parameter int unsigned PW = PROD_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] a [M],
  input  logic signed [DW-1:0] b [M],
  output logic signed [PW-1:0] p [M]
);

  logic signed [MW-1:0]   a_ext [M];
  logic signed [MW-1:0]   b_ext [M];
  logic signed [2*MW-1:0] prod  [M];

  always_comb begin
    for (int m = 0; m < int'(M); m++) begin
      a_ext[m] = MW'(a[m]);
      b_ext[m] = MW'(b[m]);
      prod[m]  = a_ext[m] * b_ext[m];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < int'(M); m++) p[m] <= '0;
    end else begin
      for (int m = 0; m < int'(M); m++) p[m] <= prod[m][PW-1:0];
    end
  end

endmodule
