// ddfs_square_tb: self-checking test of the square-pulse synthesizer.
//
// With the 12 us frequency code (7158278) the output is compared, sample by
// sample, with a 64-bit model of the phase, (n * L) mod 2^32 < 2^31, and the
// pulse-start flag with the model's rising edges. The testbench also measures
// pulse widths and periods: every pulse but the first must last 300 samples
// (6 us at 50 MHz) and every period 600 samples (12 us). A second run with a
// code of 2^32/100 checks that the rate follows the code.
module ddfs_square_tb;
  import dmf_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [31:0]   freq_code;
  sample_t       sample;
  logic          pulse_start;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  ddfs_square dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] code, input int nsamp,
                     input int want_width, input int want_period);
    longint unsigned phase;
    logic  on, on_prev;
    int    width, period, pulses, last_start;
    freq_code = code;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;        // first registered sample (phase 0)
    phase = 0; on_prev = 1'b0; width = 0; pulses = 0; last_start = -1;
    for (int n = 0; n < nsamp; n++) begin
      on = phase < 64'h8000_0000;
      checks++;
      if (sample !== (on ? sample_t'(SIG_AMP) : sample_t'(0))) begin
        failures++;
        if (failures < 10) $display("n=%0d sample %0d on=%b", n, sample, on);
      end
      checks++;
      if (pulse_start !== (on && !on_prev)) begin
        failures++;
        if (failures < 10) $display("n=%0d pulse_start %b", n, pulse_start);
      end
      // Measure widths and periods from the output itself
      if (pulse_start) begin
        if (last_start > 0) begin   // the first period after reset is 601
          period = n - last_start;
          checks++;
          if (period != want_period) begin
            failures++;
            $display("period %0d expected %0d", period, want_period);
          end
        end
        last_start = n;
        width = 0;
      end
      if (sample != 0) width++;
      if (sample == 0 && on_prev) begin
        pulses++;
        if (pulses > 1) begin
          checks++;
          if (width != want_width) begin
            failures++;
            $display("width %0d expected %0d", width, want_width);
          end
        end
      end
      on_prev = on;
      phase = (phase + 64'(code)) & 64'hFFFF_FFFF;
      @(posedge clk); #1;
    end
    checks++;
    if (pulses < 3) begin
      failures++;
      $display("only %0d pulses", pulses);
    end
  endtask

  initial begin
    run(L_SQ_DEFAULT, 4000, 300, 600);
    run(32'd42949672, 2000, 50, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
