// dmf_tb: self-checking test of the 300-tap matched filter.
//
// Loads a random reference through the ref_shift window, then holds it while
// ref_in keeps changing, and feeds random samples; every clock the output is
// compared with Y(n) = sum S(n-m) H(m) computed by the testbench from its own
// copies of both registers, delayed by the filter's pipeline. A single
// impulse then checks the 3-clock latency and that the impulse response is
// the loaded reference read out in tap order.
module dmf_tb;
  import dmf_pkg::*;

  localparam int unsigned M = M_TAPS;

  logic    clk = 1'b0;
  logic    rst_n;
  sample_t x_in, ref_in;
  logic    ref_shift;
  acc_t    y_out;

  int xs [M];
  int hs [M];
  int pipe0, pipe1, pipe2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dmf dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_sum();
    int s = 0;
    for (int m = 0; m < int'(M); m++) s += xs[m] * hs[m];
    return s;
  endfunction

  // Apply one sample, clock, update the model and compare
  task automatic step(input sample_t x, input sample_t r, input logic sh);
    x_in = x; ref_in = r; ref_shift = sh;
    @(posedge clk); #1;
    for (int m = int'(M) - 1; m > 0; m--) xs[m] = xs[m-1];
    xs[0] = int'(x);
    if (sh) begin
      for (int m = int'(M) - 1; m > 0; m--) hs[m] = hs[m-1];
      hs[0] = int'(r);
    end
    pipe2 = pipe1; pipe1 = pipe0; pipe0 = model_sum();
    checks++;
    if (int'(y_out) != pipe2) begin
      failures++;
      if (failures < 10) $display("y_out %0d expected %0d", y_out, pipe2);
    end
  endtask

  int lat;

  initial begin
    for (int m = 0; m < int'(M); m++) begin xs[m] = 0; hs[m] = 0; end
    pipe0 = 0; pipe1 = 0; pipe2 = 0;
    rst_n = 1'b0; x_in = '0; ref_in = '0; ref_shift = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Reference window with full-range random samples, input running
    for (int n = 0; n < int'(M); n++) step(sample_t'($urandom), sample_t'($urandom), 1'b1);
    // Reference held, random input
    for (int n = 0; n < 1500; n++) step(sample_t'($urandom), sample_t'($urandom), 1'b0);
    // Extreme values: all -128 against a reference reloaded to -128
    for (int n = 0; n < int'(M); n++) step(-8'sd128, -8'sd128, 1'b1);
    for (int n = 0; n < 4; n++) step(-8'sd128, 8'sd0, 1'b0);
    // Flush, then a single impulse of 1 for the latency and impulse response
    for (int n = 0; n < int'(M) + 4; n++) step(8'sd0, 8'sd0, 1'b0);
    for (int n = 0; n < int'(M); n++) step(8'sd0, sample_t'(n % 100 + 1), 1'b1);
    for (int n = 0; n < 4; n++) step(8'sd0, 8'sd0, 1'b0);
    x_in = 8'sd1; ref_shift = 1'b0;
    lat = 0;
    @(posedge clk); #1;
    lat++;
    x_in = 8'sd0;
    while (y_out == '0 && lat < 10) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != int'(DMF_LATENCY)) begin
      failures++;
      $display("latency %0d, expected %0d", lat, DMF_LATENCY);
    end
    // Impulse response: H(0), H(1), ... = reference loaded last first
    for (int m = 0; m < int'(M); m++) begin
      checks++;
      if (int'(y_out) != (int'(M) - 1 - m) % 100 + 1) begin
        failures++;
        if (failures < 10) $display("h[%0d] = %0d", m, y_out);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
