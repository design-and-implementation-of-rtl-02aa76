// multiplier_array_tb: self-checking test of the parallel 9x9 multipliers.
//
// Applies random and extreme signed operand pairs to an 8-multiplier array
// and checks each product one clock later against integer multiplication.
module multiplier_array_tb;
  import dmf_pkg::*;

  localparam int unsigned M = 8;

  logic    clk = 1'b0;
  logic    rst_n;
  sample_t a [M];
  sample_t b [M];
  prod_t   p [M];
  int      exp_p [M];
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  multiplier_array #(.M(M)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    for (int m = 0; m < int'(M); m++) begin a[m] = '0; b[m] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      for (int m = 0; m < int'(M); m++) begin
        case ($urandom % 6)
          0:       a[m] = -8'sd128;
          1:       a[m] = 8'sd127;
          default: a[m] = sample_t'($urandom);
        endcase
        case ($urandom % 6)
          0:       b[m] = -8'sd128;
          1:       b[m] = 8'sd127;
          default: b[m] = sample_t'($urandom);
        endcase
        exp_p[m] = int'(a[m]) * int'(b[m]);
      end
      @(posedge clk); #1;
      for (int m = 0; m < int'(M); m++) begin
        checks++;
        if (int'(p[m]) != exp_p[m]) begin
          failures++;
          if (failures < 10) $display("mult %0d: %0d*%0d got %0d", m, a[m], b[m], p[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
