// gain_accumulator_tb: self-checking test of the exponential gain register.
//
// Reference: G' = G + floor(G / 2^K) on UP, G - floor(G / 2^K) on DOWN,
// clamped to [2^K, 2^P - 1], unchanged on HOLD or without u_valid; reset
// value 2^K. Runs UP from the minimum to the maximum (checking the count of
// 128 unit steps from 128 to 256 at K = 7), DOWN back to the minimum, then
// random commands, with at_min / at_max checked throughout.
module gain_accumulator_tb;
  import agc_pkg::*;
  localparam int unsigned P = 10, K = 7;
  localparam int GMIN = 1 << K, GMAX = (1 << P) - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic u_valid, at_min, at_max;
  ctrl_e u;
  logic [P-1:0] gain;
  int checks = 0, failures = 0;
  int g = GMIN;
  int hit_min = 0, hit_max = 0;

  gain_accumulator #(.P(P), .K(K)) dut (.*);

  always #5 clk = ~clk;

  function automatic int model(input int gm, input ctrl_e c);
    int n;
    n = gm;
    if (c == CTRL_UP)   n = gm + gm / (1 << K);
    if (c == CTRL_DOWN) n = gm - gm / (1 << K);
    if (n > GMAX) n = GMAX;
    if (n < GMIN) n = GMIN;
    return n;
  endfunction

  task automatic cmd(input ctrl_e c, input bit v);
    @(negedge clk);
    u_valid = v; u = c;
    if (v) g = model(g, c);
    @(posedge clk); #1;
    checks++;
    if (int'(gain) != g || at_min != (g == GMIN) || at_max != (g == GMAX)) begin
      failures++;
      $display("FAIL %s v=%0d: gain %0d expected %0d", c.name(), v, gain, g);
    end
    if (at_min) hit_min++;
    if (at_max) hit_max++;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int steps;
    u_valid = 0; u = CTRL_HOLD;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (int'(gain) != GMIN) begin failures++; $display("FAIL reset value %0d", gain); end
    rst_n = 1'b1;
    steps = 0;
    while (g < 256) begin cmd(CTRL_UP, 1'b1); steps++; end
    checks++;
    if (steps != 128) begin failures++; $display("FAIL %0d steps to 256", steps); end
    while (g < GMAX) cmd(CTRL_UP, 1'b1);
    repeat (3) cmd(CTRL_UP, 1'b1);       // saturate at the top
    cmd(CTRL_DOWN, 1'b0);                // no update without u_valid
    while (g > GMIN) cmd(CTRL_DOWN, 1'b1);
    repeat (3) cmd(CTRL_DOWN, 1'b1);     // saturate at the bottom
    for (int n = 0; n < 5000; n++) begin
      ctrl_e c;
      c = ctrl_e'($urandom_range(0, 2));
      if ($urandom_range(0, 9) < 6) c = ((n / 300) % 2 != 0) ? CTRL_DOWN : CTRL_UP;
      cmd(c, $urandom_range(0, 4) != 0);
    end
    checks++;
    if (hit_min == 0 || hit_max == 0) begin failures++; $display("FAIL limits not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
