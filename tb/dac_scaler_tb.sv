// dac_scaler_tb: self-checking test of the DAC code conversion.
//
// Random and extreme 27-bit signed inputs are divided by 2^9 (rounding
// toward minus infinity), clipped to [-128, 127] and offset by 128 in real
// arithmetic; the registered code must match one clock later. Reset must give
// the zero code, 128.
module dac_scaler_tb;
  import dmf_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  acc_t       din;
  logic [7:0] code;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  dac_scaler dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    rst_n = 1'b0; din = 27'sd12345;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (code != 8'd128) failures++;
    #1 rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      case (n % 8)
        0: din = acc_t'($urandom);                              // full range
        1: din = -27'sd67108864;
        2: din = 27'sd58800;
        default: din = acc_t'(int'($urandom % 200000) - 100000); // mostly in range
      endcase
      e = int'($floor(real'(din) / 512.0));
      if (e > 127) e = 127;
      if (e < -128) e = -128;
      e += 128;
      @(posedge clk); #1;
      checks++;
      if (int'(code) != e) begin
        failures++;
        if (failures < 10) $display("din %0d: code %0d expected %0d", din, code, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
