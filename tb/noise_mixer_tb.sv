// noise_mixer_tb: self-checking test of the signal-plus-noise adder.
//
// For every SNR setting and random signal and noise words, the registered
// output is compared with floor(noise * k * AMP / 128) + signal computed in
// real arithmetic and clipped to [-128, 127]. The default instance (AMP 14)
// must never clip; a second instance with AMP 40 must clip, and its
// saturated flag must match.
module noise_mixer_tb;
  import dmf_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n;
  sample_t  signal_in, noise_in;
  snr_sel_e snr_sel;
  sample_t  mix_out, mix_out40;
  logic     saturated, saturated40;
  int       checks = 0, failures = 0, clips = 0;

  always #5 clk = ~clk;

  noise_mixer dut (.*);
  noise_mixer #(.AMP(40)) dut40 (.clk, .rst_n, .signal_in, .noise_in, .snr_sel,
                                 .mix_out(mix_out40), .saturated(saturated40));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(input int sig, input int nz, input int k, input int amp);
    int v = sig + int'($floor(real'(nz) * real'(k * amp) / 128.0));
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  function automatic int mult(input snr_sel_e s);
    case (s)
      SNR_1_1: return 1;
      SNR_1_2: return 2;
      SNR_1_3: return 3;
      SNR_1_8: return 8;
      default: return 0;
    endcase
  endfunction

  initial begin
    rst_n = 1'b0; signal_in = '0; noise_in = '0; snr_sel = SNR_NOISE_OFF;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      snr_sel   = snr_sel_e'($urandom % 5);
      noise_in  = (n % 50 == 0) ? -8'sd128 : (n % 50 == 1) ? 8'sd127 : sample_t'($urandom);
      signal_in = ($urandom % 2) ? sample_t'(SIG_AMP) : 8'sd0;
      @(posedge clk); #1;
      checks++;
      if (int'(mix_out) != expected(signal_in, noise_in, mult(snr_sel), SIG_AMP) || saturated) begin
        failures++;
        if (failures < 10) $display("sel %0d sig %0d nz %0d: got %0d", snr_sel, signal_in, noise_in, mix_out);
      end
      signal_in = ($urandom % 2) ? 8'sd40 : 8'sd0;
      @(posedge clk); #1;
      begin
        int   raw;
        logic clip;
        raw  = int'(signal_in) + int'($floor(real'(noise_in) * real'(mult(snr_sel) * 40) / 128.0));
        clip = raw > 127 || raw < -128;
        clips += int'(clip);
        checks++;
        if (int'(mix_out40) != expected(signal_in, noise_in, mult(snr_sel), 40) || saturated40 != clip) begin
          failures++;
          if (failures < 10) $display("AMP40 sel %0d sig %0d nz %0d: got %0d", snr_sel, signal_in, noise_in, mix_out40);
        end
      end
    end
    checks++;
    if (clips == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
