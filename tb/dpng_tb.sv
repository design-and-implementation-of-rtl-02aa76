// dpng_tb: self-checking test of the pseudo-noise generator.
//
// For the 60-bit generator the testbench records the bit entering the
// register each clock and checks the recurrence b(n) = NOT(b(n-60) XOR
// b(n-59)) that defines the sequence, checks that the noise word is +127 for a
// one and -128 for a zero, and checks that ones and zeros and the sign of the
// noise are roughly balanced. A 15-bit generator with the same feedback rule
// must return to its seed after exactly 2^15 - 1 clocks and not before.
module dpng_tb;
  import dmf_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n;
  sample_t       noise, noise15;
  logic [59:0]   state;
  logic [14:0]   state15;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  dpng dut (.clk, .rst_n, .noise, .state);
  dpng #(.K(15), .SEED(15'h1234)) dut15 (.clk, .rst_n, .noise(noise15), .state(state15));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NBITS = 4000;
  logic bits [NBITS + 60];   // bits[i + 60]: bit shifted in at clock i; the seed before it
  int   ones, positive;
  int   period;

  initial begin
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1;
    for (int i = 0; i < 60; i++) bits[59 - i] = state[i];   // seed, oldest bit first
    ones = 0; positive = 0; period = 0;
    for (int n = 0; n < NBITS; n++) begin
      @(posedge clk); #1;
      period++;
      if (state15 == 15'h1234 && period < 32767) begin
        failures++;
        $display("15-bit generator repeated after %0d", period);
      end
      bits[n + 60] = state[0];
      checks++;
      if (bits[n + 60] !== ~(bits[n] ^ bits[n + 1])) begin
        failures++;
        if (failures < 10) $display("recurrence fails at %0d", n);
      end
      checks++;
      if (int'(noise) != (bits[n + 60] ? 127 : -128)) begin
        failures++;
        if (failures < 10) $display("noise word %0d for bit %b", noise, bits[n + 60]);
      end
      ones     += int'(state[0]);
      positive += int'(noise >= 0);
    end
    checks++;
    if (ones < NBITS * 45 / 100 || ones > NBITS * 55 / 100) begin
      failures++;
      $display("unbalanced: %0d ones of %0d", ones, NBITS);
    end
    checks++;
    if (positive < NBITS * 45 / 100 || positive > NBITS * 55 / 100) begin
      failures++;
      $display("unbalanced sign: %0d of %0d", positive, NBITS);
    end
    // Run the 15-bit generator to the end of its period
    while (period < 32767) begin
      @(posedge clk); #1;
      period++;
      if (state15 == 15'h1234 && period < 32767) begin
        failures++;
        $display("15-bit generator repeated after %0d", period);
      end
    end
    checks++;
    if (state15 != 15'h1234) begin
      failures++;
      $display("15-bit generator not back at its seed after 32767 clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
