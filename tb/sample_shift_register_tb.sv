// sample_shift_register_tb: self-checking test of the tap shift register.
//
// Drives random samples with a random shift enable into a 16-stage register
// and compares every tap, every clock, with a queue kept by the testbench.
// Also checks that reset clears all stages.
module sample_shift_register_tb;
  import dmf_pkg::*;

  localparam int unsigned M = 16;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    shift_en;
  sample_t d;
  sample_t taps [M];
  sample_t model [M];
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  sample_shift_register #(.M(M)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int m = 0; m < int'(M); m++) begin
      checks++;
      if (taps[m] !== model[m]) begin
        failures++;
        if (failures < 10) $display("tap %0d: got %0d expected %0d", m, taps[m], model[m]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; shift_en = 1'b1; d = 8'sd55;
    repeat (3) @(posedge clk);
    #1;
    for (int m = 0; m < int'(M); m++) model[m] = '0;
    compare();
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      d        = sample_t'($urandom);
      shift_en = ($urandom % 4) != 0;
      @(posedge clk); #1;
      if (shift_en) begin
        for (int m = int'(M) - 1; m > 0; m--) model[m] = model[m-1];
        model[0] = d;
      end
      compare();
    end
    rst_n = 1'b0;
    @(posedge clk); #1;
    for (int m = 0; m < int'(M); m++) model[m] = '0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
