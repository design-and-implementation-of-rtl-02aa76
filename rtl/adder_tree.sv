// adder_tree: sums the M tap products into one wide result.
//
// As in the original design, the adder takes 300 signed 16-bit inputs and
// gives one 27-bit output (16 bits plus 9 bits of growth for 300 terms, with
// two spare). Its inner structure is not prescribed; here every input is
// sign-extended to the output width and added in one expression, which
// synthesis builds as a tree of adders. The sum is registered, so sum follows
// p by one clock; the register and its synchronous reset are choices of this
// implementation.
module adder_tree
  import dmf_pkg::*;
#(
  parameter int unsigned M  = M_TAPS,
  parameter int unsigned PW = PROD_W,
  parameter int unsigned AW = ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [PW-1:0] p [M],
  output logic signed [AW-1:0] sum
);

  logic signed [AW-1:0] total;

  always_comb begin
    total = '0;
    for (int m = 0; m < int'(M); m++) total += AW'(p[m]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) sum <= '0;
    else        sum <= total;
  end

endmodule
