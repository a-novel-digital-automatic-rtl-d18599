// agc_level_sweep_tb: input-level sweep of the full AGC at default sizes,
// in the style of a channel-power measurement.
//
// Noise-like I/Q samples (sum of four uniform variates, clipped to 14 bits
// as a converter would) are fed at one complex sample every 8 clocks, the
// ratio of a 61.44 MHz clock to 7.68 Msample/s data. The input level steps
// from -21 to +3 dB in 3 dB steps, with +3 dB at an RMS of 2900 LSB per rail.
// The reference is 8 dB below the peak of the 5-bit output:
// p_ref = 2 * 16^2 * 2^32 / 10^0.8, i.e. about 81 output LSB^2 per sample.
//
// Checks:
//  * slew: from reset at -21 dB the loop only raises the gain; the number of
//    updates until the ceiling and the clock count (updates * M * 8) must
//    match the truncating-step model G += floor(G / 2^K);
//  * levels -12..+3 dB need a gain inside [2^K, 2^P - 1]: over the last 200
//    updates of each level the mean P_m must be within 0.5 dB of p_ref and
//    the mean power of the 5-bit output within 1.5 dB of the target;
//  * levels -18 and -21 dB need more gain than 2^P - 1: the gain must sit
//    at its ceiling and the output fall below the target.
// A table of level, mean gain, AGC output power and the power of the plain
// top 5 input bits (no AGC) is printed.
module agc_level_sweep_tb;
  import agc_pkg::*;
  localparam int NI = AGC_NI, NO = AGC_NO, P = AGC_P, K = AGC_K, M = AGC_M;
  localparam int SQW = 2 * (NI + P);
  localparam int GMIN = 1 << K, GMAX = (1 << P) - 1;
  localparam int CLK_PER_SAMPLE = 8;
  localparam int UPDATES_PER_LEVEL = 600, MEASURE = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_clip, pm_valid, at_min, at_max;
  logic signed [NI-1:0] in_i, in_q;
  logic signed [NO-1:0] out_i, out_q;
  logic [SQW-1:0] p_ref, pm;
  logic [P-1:0] gain;

  digital_agc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  // measurement accumulators, cleared per level
  bit      measuring = 1'b0;
  int      n_upd = 0;
  real     pm_sum = 0.0, out_sum = 0.0, raw_sum = 0.0, g_sum = 0.0;
  longint  n_out = 0, n_raw = 0, n_pm = 0;
  int      top_i, top_q;

  always @(negedge clk) if (rst_n) begin
    if (pm_valid) begin
      n_upd++;
      if (measuring) begin pm_sum += real'(pm); g_sum += real'(gain); n_pm++; end
    end
    if (out_valid && measuring) begin
      out_sum += real'(int'(out_i) * int'(out_i) + int'(out_q) * int'(out_q));
      n_out++;
    end
  end

  function automatic int noise(input int rms);
    // sum of four uniforms on [-u, u] has variance 4u^2/3; u = rms*sqrt(3)/2
    real u, s;
    int v;
    u = real'(rms) * 0.8660254;
    s = 0.0;
    repeat (4) s += (real'($urandom_range(0, 65535)) / 32767.5 - 1.0) * u;
    v = int'(s);
    if (v > 8191) v = 8191;
    if (v < -8192) v = -8192;
    return v;
  endfunction

  function automatic real db(input real x);
    return 10.0 * $ln(x) / $ln(10.0);
  endfunction

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real target_out;   // target output power in 5-bit LSB^2 per complex sample
  int  sample_no = 0;
  longint t_reset;

  // sample source: one complex sample every CLK_PER_SAMPLE clocks
  int rms_now = 0;
  initial begin
    in_valid = 0; in_i = '0; in_q = '0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      in_valid = 1'b1;
      in_i = NI'(noise(rms_now)); in_q = NI'(noise(rms_now));
      if (measuring) begin
        // no-AGC reference: the top NO bits of the input, D[13:9]
        top_i = int'(in_i) >>> (NI - NO); top_q = int'(in_q) >>> (NI - NO);
        raw_sum += real'(top_i * top_i + top_q * top_q);
        n_raw++;
      end
      @(negedge clk);
      in_valid = 1'b0;
      repeat (CLK_PER_SAMPLE - 2) @(negedge clk);
    end
  end

  initial begin
    int exp_upd, g;
    longint t_max;
    real pm_db, out_db, raw_db;
    p_ref = SQW'(longint'(2.0 * 256.0 * (2.0 ** 32) / (10.0 ** 0.8)));
    target_out = 2.0 * 256.0 / (10.0 ** 0.8);
    // truncating-step model of the climb from 2^K to the ceiling
    g = GMIN; exp_upd = 0;
    while (g < GMAX) begin g = g + g / (1 << K); if (g > GMAX) g = GMAX; exp_upd++; end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t_reset = cyc;
    $display(" level  mean gain   AGC out [dB re target]   top 5 bits, no AGC [dB re target]");
    for (int lvl = -21; lvl <= 3; lvl += 3) begin
      rms_now = int'(2900.0 * (10.0 ** (real'(lvl - 3) / 20.0)));
      n_upd = 0;
      if (lvl == -21) begin
        wait (at_max);
        t_max = cyc - t_reset;
        checks++;
        if (n_upd != exp_upd) begin
          failures++; $display("FAIL ceiling after %0d updates, model %0d", n_upd, exp_upd);
        end
        checks++;
        // each update takes M samples of CLK_PER_SAMPLE clocks; allow the
        // pipeline latency and the phase of the sample source
        if (t_max < longint'(exp_upd) * M * CLK_PER_SAMPLE ||
            t_max > longint'(exp_upd) * M * CLK_PER_SAMPLE + 2 * CLK_PER_SAMPLE + 8) begin
          failures++; $display("FAIL ceiling after %0d clocks, expected %0d", t_max, exp_upd * M * CLK_PER_SAMPLE);
        end
        $display("  slew: ceiling after %0d updates, %0d clocks (%.3f ms at 61.44 MHz)",
                 n_upd, t_max, real'(t_max) / 61440.0);
      end
      wait (n_upd >= UPDATES_PER_LEVEL - MEASURE);
      pm_sum = 0; out_sum = 0; raw_sum = 0; g_sum = 0; n_out = 0; n_raw = 0; n_pm = 0;
      measuring = 1'b1;
      wait (n_upd >= UPDATES_PER_LEVEL);
      measuring = 1'b0;
      pm_db  = db(pm_sum / real'(n_pm) / real'(p_ref));
      out_db = db(out_sum / real'(n_out) / target_out);
      raw_db = db((raw_sum + 1e-9) / real'(n_raw) / target_out);
      $display(" %4d   %7.1f        %6.2f                   %6.2f", lvl, g_sum / real'(n_pm), out_db, raw_db);
      if (lvl >= -12) begin
        checks += 2;
        if (pm_db > 0.5 || pm_db < -0.5) begin failures++; $display("FAIL level %0d: P_m %.2f dB off", lvl, pm_db); end
        if (out_db > 1.5 || out_db < -1.5) begin failures++; $display("FAIL level %0d: output %.2f dB off", lvl, out_db); end
      end else if (lvl <= -18) begin
        checks += 2;
        if (!at_max) begin failures++; $display("FAIL level %0d: gain %0d not at ceiling", lvl, gain); end
        if (out_db > -1.0) begin failures++; $display("FAIL level %0d: output %.2f dB not below target", lvl, out_db); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
