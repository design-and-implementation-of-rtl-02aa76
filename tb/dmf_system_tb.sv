// dmf_system_tb: end-to-end test of the matched-filter system at full size
// (M = 300 taps, 50 MHz, 12 us pulse period) with every parameter at its
// default.
//
// The testbench keeps its own model of the synthesized pulse train (a 64-bit
// phase accumulator) and of the filter, and checks, every clock:
//   - with noise off, that the filter input is exactly the 300-on/300-off
//     pulse train;
//   - once the reference is loaded, that the filter output equals
//     14 * (sum of the last 300 filter inputs), i.e. the correlation with a
//     reference of 300 samples of amplitude 14, 3 clocks late;
//   - that both DAC codes follow their signals one clock late.
// With noise off the output must be a triangle with a 58800 peak and a base
// of 2 x 300 samples (the output pulse is twice as wide as the input pulse).
// It then runs the four input SNR cases, 1/1, 1/2, 1/3 and 1/8, measures the
// processing gain SNR_out / SNR_in from the difference between the noisy and
// the noise-free signals, requires it to be within 3 dB of 10 log10(300),
// about 24.8 dB, and requires the output peak of at least 90% of the periods
// to fall within a quarter period of the noise-free peak. It counts each mechanism (reference load, reload, the
// five noise settings, detected peaks) and fails if one never happened.
module dmf_system_tb;
  import dmf_pkg::*;

  localparam int M      = int'(M_TAPS);
  localparam int PERIOD = 600;
  localparam int MAXT   = 60000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] freq_code;
  logic [2:0]  snr_sel;
  logic        reload;
  logic [7:0]  dac_in_code, dac_out_code;
  logic signed [7:0]  dmf_in;
  logic signed [26:0] dmf_out;
  logic        ref_valid;

  always #5 clk = ~clk;

  dmf_system dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (MAXT + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Histories indexed by clock t (t = 0 at the first edge after reset)
  int   x_hist [MAXT];   // dmf_in after edge t
  int   c_hist [MAXT];   // clean pulse sample leaving the synthesizer after edge t
  int   y_prev;
  logic [7:0] in_code_exp;

  // Mechanism counters
  int n_ref_loads = 0, n_reloads = 0, n_peaks_ok = 0;
  int n_mode [5];

  task automatic check(input logic ok, input string what, input int t);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("t=%0d %s", t, what);
    end
  endtask

  function automatic int dac_code(input int v, input int shift);
    int e = int'($floor(real'(v) / real'(1 << shift)));
    if (e > 127) e = 127;
    if (e < -128) e = -128;
    return e + 128;
  endfunction

  int t;
  longint unsigned phase;
  int ref_valid_run;
  logic single_m_prev = 1'b0;

  // Advance one clock, update models, run the per-clock checks
  task automatic tick(input logic noise_off);
    int y_exp, c;
    @(posedge clk); #1;
    t++;
    // pulse sample registered at edge t belongs to phase t*L
    c = (phase < 64'h8000_0000) ? SIG_AMP : 0;
    c_hist[t] = c;
    phase = (phase + 64'(L_SQ_DEFAULT)) & 64'hFFFF_FFFF;
    x_hist[t] = int'(dmf_in);
    if (noise_off && t >= 1) check(x_hist[t] == c_hist[t-1], "clean input differs from pulse model", t);
    // DAC codes, one clock behind their signals
    if (t >= 1) begin
      check(int'(dac_in_code) == dac_code(x_hist[t-1], 0), "dac_in_code", t);
      check(int'(dac_out_code) == dac_code(y_prev, 9), "dac_out_code", t);
    end
    y_prev = int'(dmf_out);
    // Filter output against the correlation model
    ref_valid_run = ref_valid ? ref_valid_run + 1 : 0;
    if (ref_valid_run >= 3 && t >= M + 3) begin
      y_exp = 0;
      for (int m = 0; m < M; m++) y_exp += x_hist[t-3-m];
      y_exp *= SIG_AMP;
      check(int'(dmf_out) == y_exp, "filter output differs from correlation model", t);
    end
    if (dut.single_m && !single_m_prev) n_ref_loads++;
    single_m_prev = dut.single_m;
  endtask

  // Noise-free output expected at clock t: 14 * 14 * pulses in the window
  function automatic int y_clean(input int tt);
    int s = 0;
    for (int m = 0; m < M; m++) if (tt - 4 - m >= 0) s += c_hist[tt-4-m];
    return s * SIG_AMP;
  endfunction

  // Run one SNR case for a number of periods and measure it
  task automatic run_case(input snr_sel_e sel, input int periods, input real ratio);
    int    t0, first;
    real   in_var, out_var, in_sum, out_sum, nin, nout, gain_db, snr_in, snr_out;
    int    best, best_t, clean_peak_t, best_clean;
    int    case_ok = 0;
    snr_sel = sel;
    t0 = t;
    in_var = 0; out_var = 0; in_sum = 0; out_sum = 0; nin = 0; nout = 0;
    for (int p = 0; p < periods; p++) begin
      best = -(1 << 30); best_t = 0; best_clean = -1; clean_peak_t = 0;
      for (int k = 0; k < PERIOD; k++) begin
        tick(sel == SNR_NOISE_OFF);
        n_mode[int'(sel)]++;
        if (t - t0 > 2) begin
          real d = real'(x_hist[t] - c_hist[t-1]);
          in_sum += d; in_var += d * d; nin += 1;
        end
        if (t - t0 > M + 8) begin
          real d = real'(int'(dmf_out) - y_clean(t));
          out_sum += d; out_var += d * d; nout += 1;
        end
        if (int'(dmf_out) > best) begin best = int'(dmf_out); best_t = t; end
        if (y_clean(t) > best_clean) begin best_clean = y_clean(t); clean_peak_t = t; end
      end
      // Peak of each period near the noise-free peak (skip the first period
      // after a change of setting)
      if (p > 0) begin
        int err = best_t - clean_peak_t;
        if (err < 0) err = -err;
        if (err > PERIOD / 2) err = PERIOD - err;
        if (err <= PERIOD / 4) begin n_peaks_ok++; case_ok++; end
        if (sel == SNR_NOISE_OFF) begin
          check(best == M * SIG_AMP * SIG_AMP, "noise-free peak value", t);
          check(err == 0, "noise-free peak position", t);
        end
      end
    end
    // At least 90% of the periods must show their peak within a quarter
    // period of the noise-free peak
    check(case_ok * 10 >= (periods - 1) * 9,
          $sformatf("peak found in %0d of %0d periods", case_ok, periods - 1), t);
    if (sel != SNR_NOISE_OFF) begin
      $display("noise x%0.0f: peak found in %0d of %0d periods", ratio, case_ok, periods - 1);
      in_var  = in_var / nin - (in_sum / nin) ** 2;
      out_var = out_var / nout - (out_sum / nout) ** 2;
      snr_in  = real'(SIG_AMP * SIG_AMP) / in_var;
      snr_out = real'(M * SIG_AMP * SIG_AMP) ** 2 / out_var;
      gain_db = 10.0 * $log10(snr_out / snr_in);
      $display("noise x%0.0f: input SNR %0.2f dB, output SNR %0.2f dB, gain %0.2f dB",
               ratio, 10.0 * $log10(snr_in), 10.0 * $log10(snr_out), gain_db);
      check(gain_db > 10.0 * $log10(real'(M)) - 3.0 && gain_db < 10.0 * $log10(real'(M)) + 3.0,
            "processing gain", t);
    end
  endtask

  initial begin
    int base_start, base_end;
    for (int i = 0; i < 5; i++) n_mode[i] = 0;
    rst_n = 1'b0; reload = 1'b0; snr_sel = SNR_NOISE_OFF; freq_code = L_SQ_DEFAULT;
    y_prev = 0; ref_valid_run = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    t = -1; phase = 0;
    // t = 0 is the first edge after reset
    tick(1'b1);
    // Noise off: reference load, clean triangle
    run_case(SNR_NOISE_OFF, 4, 0.0);
    check(ref_valid == 1'b1, "reference not loaded", t);
    // Triangle base: zero-to-zero distance of the noise-free output
    base_start = -1; base_end = -1;
    for (int k = 0; k < 2 * PERIOD && base_end < 0; k++) begin
      tick(1'b1);
      if (dmf_out == 0) begin
        if (base_start < 0) base_start = t;
        else if (t - base_start > 10) base_end = t;
      end
    end
    check(base_end - base_start == 2 * M, $sformatf("output base %0d samples", base_end - base_start), t);
    // Reload the reference: ref_valid drops and returns after one window
    reload = 1'b1;
    tick(1'b1);
    reload = 1'b0;
    n_reloads++;
    check(ref_valid == 1'b0, "ref_valid after reload", t);
    run_case(SNR_NOISE_OFF, 2, 0.0);
    check(ref_valid == 1'b1, "reference not reloaded", t);
    // The four input SNR cases of the original experiments
    run_case(SNR_1_1, 20, 1.0);
    run_case(SNR_1_2, 20, 2.0);
    run_case(SNR_1_3, 20, 3.0);
    run_case(SNR_1_8, 20, 8.0);
    $display("mechanisms: ref loads %0d, reloads %0d, peaks found %0d, cycles off/1/2/3/8: %0d %0d %0d %0d %0d",
             n_ref_loads, n_reloads, n_peaks_ok, n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4]);
    check(n_ref_loads == 2, "reference loads", t);
    check(n_reloads > 0, "reload", t);
    check(n_peaks_ok > 0, "peaks", t);
    for (int i = 0; i < 5; i++) check(n_mode[i] > 0, "noise setting never used", t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
