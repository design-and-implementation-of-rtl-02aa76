// single_m_ctrl_tb: self-checking test of the reference-load window.
//
// After reset the controller must ignore time until a pulse start, then hold
// single_m high for exactly M = 300 consecutive clocks beginning on the
// pulse-start clock, then raise ref_valid and ignore further pulse starts.
// A reload re-arms it, and a reload in the middle of a window aborts that
// window. Each window is timed by the testbench's own counter.
module single_m_ctrl_tb;
  import dmf_pkg::*;

  localparam int unsigned M = M_TAPS;

  logic clk = 1'b0;
  logic rst_n, reload, pulse_start;
  logic single_m, ref_valid;
  int   checks = 0, failures = 0;
  int   windows = 0;

  always #5 clk = ~clk;

  single_m_ctrl dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%t %s: got %b expected %b", $time, what, got, want);
    end
  endtask

  // Wait idle cycles, then a pulse start, and check a full window
  task automatic full_window(input int idle);
    pulse_start = 1'b0;
    for (int n = 0; n < idle; n++) begin
      #1; expect_eq(single_m, 1'b0, "idle single_m");
      expect_eq(ref_valid, 1'b0, "idle ref_valid");
      @(posedge clk); #1;
    end
    for (int n = 0; n < int'(M); n++) begin
      pulse_start = (n == 0) || (n == 150);   // a second start inside is ignored
      #1; expect_eq(single_m, 1'b1, "window single_m");
      expect_eq(ref_valid, 1'b0, "window ref_valid");
      @(posedge clk); #1;
    end
    windows++;
    for (int n = 0; n < 700; n++) begin
      pulse_start = (n % 600) == 0;
      #1; expect_eq(single_m, 1'b0, "after single_m");
      expect_eq(ref_valid, 1'b1, "after ref_valid");
      @(posedge clk); #1;
    end
    pulse_start = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; reload = 1'b0; pulse_start = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    full_window(37);
    // Reload, then a new window
    reload = 1'b1; @(posedge clk); #1 reload = 1'b0;
    full_window(5);
    // Reload, start a window, abort it half way with another reload
    reload = 1'b1; @(posedge clk); #1 reload = 1'b0;
    pulse_start = 1'b1;
    for (int n = 0; n < 100; n++) begin
      #1; expect_eq(single_m, 1'b1, "aborted window");
      @(posedge clk); #1;
      pulse_start = 1'b0;
    end
    reload = 1'b1;
    #1; expect_eq(single_m, 1'b0, "single_m during reload");
    @(posedge clk); #1 reload = 1'b0;
    full_window(11);
    // Pulse start right after reset
    rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1;
    full_window(0);
    checks++;
    if (windows != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
