// adder_tree_tb: self-checking test of the 300-input, 27-bit adder.
//
// Applies random and extreme (all most-negative, all most-positive) 16-bit
// product vectors and checks the registered sum one clock later against an
// integer sum.
module adder_tree_tb;
  import dmf_pkg::*;

  localparam int unsigned M = M_TAPS;

  logic  clk = 1'b0;
  logic  rst_n;
  prod_t p [M];
  acc_t  sum;
  int    expected;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  adder_tree dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    for (int m = 0; m < int'(M); m++) p[m] = '0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (sum !== '0) failures++;
    #1 rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      expected = 0;
      for (int m = 0; m < int'(M); m++) begin
        case (n)
          0:       p[m] = -16'sd32768;
          1:       p[m] = 16'sd32767;
          default: p[m] = prod_t'($urandom);
        endcase
        expected += int'(p[m]);
      end
      @(posedge clk); #1;
      checks++;
      if (int'(sum) != expected) begin
        failures++;
        if (failures < 10) $display("vector %0d: got %0d expected %0d", n, sum, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
