// digital_agc_tb: end-to-end test of the AGC loop at its default sizes
// (NI = 14, NO = 5, P = 10, K = 7, M = 128).
//
// Complex samples are sent in windows of M, followed by a short idle gap so
// that each gain update lands between windows. An independent model in this
// file computes, per window, every output pair floor(x * G / 2^16) clamped
// to 5 bits, the average power sum((x * G)^2) / M, the sign decision and the
// next gain, and every DUT output, P_m and gain is compared with it. The
// latency from acceptance to out_valid is checked on every pair.
//
// Phases:
//  A  constant input {496, 929} from the minimum gain with the reference at
//     the power of gain 720: the gain must climb by unit steps for 128
//     windows (reaching 256), settle toggling around 720, and the output
//     must end at {5, 10};
//  B  reference set to the exact current power: the gain must hold;
//  C  small input, very high reference: the gain must stop at 2^P - 1;
//  D  large input, tiny reference: the first window clips the output, then
//     the gain falls to its floor 2^K;
//  E  random samples whose amplitude steps over a 24 dB range.
// Every mechanism (raise, lower, hold, upper limit, lower limit, output
// clamp) is counted and must occur at least once.
module digital_agc_tb;
  import agc_pkg::*;
  localparam int NI = AGC_NI, NO = AGC_NO, P = AGC_P, K = AGC_K, M = AGC_M;
  localparam int NW = NI + P, SQW = 2 * NW, LSB = K + NI - NO;
  localparam int GMIN = 1 << K, GMAX = (1 << P) - 1;
  localparam int LATENCY = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_clip, pm_valid, at_min, at_max;
  logic signed [NI-1:0] in_i, in_q;
  logic signed [NO-1:0] out_i, out_q;
  logic [SQW-1:0] p_ref, pm;
  logic [P-1:0] gain;

  digital_agc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_up = 0, n_down = 0, n_hold = 0, n_max = 0, n_min = 0, n_clip = 0, n_pm = 0;
  int g = GMIN;            // model gain
  longint ref_power;

  always @(posedge clk) cyc++;

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  // expected output pairs with their due cycle
  int exp_i[$], exp_q[$], exp_c[$], exp_clip[$];

  always @(negedge clk) if (rst_n) begin
    if (pm_valid) n_pm++;
    if (out_valid) begin
      checks++;
      if (exp_i.size() == 0) fail("unexpected output");
      else begin
        int ei, eq, ec, ep;
        ei = exp_i.pop_front(); eq = exp_q.pop_front();
        ec = exp_c.pop_front(); ep = exp_clip.pop_front();
        if (int'(out_i) != ei || int'(out_q) != eq || int'(out_clip) != ep)
          fail($sformatf("output %0d/%0d clip %0d, expected %0d/%0d clip %0d (gain %0d)",
                         out_i, out_q, out_clip, ei, eq, ep, g));
        if (cyc != ec) fail($sformatf("output at cycle %0d, expected %0d", cyc, ec));
        if (out_clip) n_clip++;
      end
    end
  end

  function automatic int quant(input longint w, output bit clip);
    longint q;
    q = (w >= 0) ? w / (64'sd1 << LSB) : -((-w + (64'sd1 << LSB) - 1) / (64'sd1 << LSB));
    clip = (q > 15) || (q < -16);
    return (q > 15) ? 15 : (q < -16) ? -16 : int'(q);
  endfunction

  // one complex sample: model output, send, return its power contribution
  task automatic send(input int xi, input int xq, inout longint sum);
    longint wi, wq;
    bit ci, cq;
    int oi, oq;
    wi = longint'(xi) * g; wq = longint'(xq) * g;
    oi = quant(wi, ci); oq = quant(wq, cq);
    sum += wi * wi + wq * wq;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_valid = 1'b1; in_i = NI'(xi); in_q = NI'(xq);
    exp_i.push_back(oi); exp_q.push_back(oq);
    exp_c.push_back(cyc + 1 + LATENCY); exp_clip.push_back(int'(ci || cq));
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // generator modes
  localparam int GEN_CONST = 0, GEN_RAND = 1;

  task automatic window(input int mode, input int ai, input int aq);
    longint sum, epm;
    int gn;
    sum = 0;
    for (int n = 0; n < M; n++) begin
      if (mode == GEN_CONST) send(ai, aq, sum);
      else send($signed($urandom_range(0, 2 * ai)) - ai, $signed($urandom_range(0, 2 * aq)) - aq, sum);
    end
    epm = sum / longint'(M);
    gn = g;
    if (longint'(p_ref) > epm) begin gn = g + g / (1 << K); n_up++; end
    else if (longint'(p_ref) < epm) begin gn = g - g / (1 << K); n_down++; end
    else n_hold++;
    if (gn > GMAX) gn = GMAX;
    if (gn < GMIN) gn = GMIN;
    repeat (12) @(negedge clk);
    checks++;
    if (longint'(pm) != epm) fail($sformatf("P_m %0d expected %0d", pm, epm));
    g = gn;
    checks++;
    if (int'(gain) != g) fail($sformatf("gain %0d expected %0d", gain, g));
    checks++;
    if (at_max != (g == GMAX) || at_min != (g == GMIN)) fail("limit flags");
    if (at_max) n_max++;
    if (at_min) n_min++;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w256, npm0;
    in_valid = 0; in_i = '0; in_q = '0;
    ref_power = longint'(496 * 496 + 929 * 929) * 720 * 720;
    p_ref = SQW'(ref_power);
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (int'(gain) != GMIN) fail("reset gain");
    rst_n = 1'b1;

    // A: convergence of the published constant-input example
    w256 = -1;
    for (int w = 0; w < 320; w++) begin
      window(GEN_CONST, 496, 929);
      if (w256 < 0 && g >= 256) w256 = w + 1;
    end
    checks++;
    if (w256 != 128) fail($sformatf("gain reached 256 after %0d updates", w256));
    checks++;
    if (!(g == 716 || g == 721)) fail($sformatf("locked gain %0d", g));
    checks++;
    if (out_i != 5 || out_q != 10) fail($sformatf("locked output %0d/%0d", out_i, out_q));
    $display("A: lock gain %0d, output %0d/%0d, 256 reached after %0d updates", g, out_i, out_q, w256);

    // B: reference equal to the measured power
    p_ref = SQW'(longint'(496 * 496 + 929 * 929) * g * g);
    npm0 = n_hold;
    repeat (4) window(GEN_CONST, 496, 929);
    checks++;
    if (n_hold - npm0 != 4) fail("hold not taken");

    // C: weak input, gain rises to its ceiling
    p_ref = '1 >> 1;
    repeat (120) window(GEN_CONST, 10, -20);
    checks++;
    if (g != GMAX) fail("gain did not reach its ceiling");

    // D: strong input, output clamps, gain falls to its floor
    p_ref = 1;
    repeat (330) window(GEN_CONST, 8000, -8100);
    checks++;
    if (g != GMIN) fail("gain did not reach its floor");

    // E: random input, amplitude stepped over 24 dB
    p_ref = SQW'(ref_power);
    for (int s = 0; s < 8; s++) begin
      int a;
      a = 8000 >> (s % 5);
      repeat (60) window(GEN_RAND, a, a);
    end

    repeat (20) @(negedge clk);
    checks++;
    if (exp_i.size() != 0) fail("outputs missing");
    checks++;
    if (n_pm != n_up + n_down + n_hold) fail($sformatf("%0d power averages for %0d windows", n_pm, n_up + n_down + n_hold));
    $display("mechanisms: raise %0d, lower %0d, hold %0d, at ceiling %0d, at floor %0d, clipped pairs %0d",
             n_up, n_down, n_hold, n_max, n_min, n_clip);
    checks++;
    if (n_up == 0 || n_down == 0 || n_hold == 0 || n_max == 0 || n_min == 0 || n_clip == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
