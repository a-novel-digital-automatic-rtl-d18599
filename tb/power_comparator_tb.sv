// power_comparator_tb: self-checking test of u_m = sgn(P_ref - P_m).
//
// Random, nearly equal and equal pairs of 48-bit powers; the decision must
// appear one cycle after pm_valid and stay unchanged when pm_valid is low.
module power_comparator_tb;
  import agc_pkg::*;
  localparam int unsigned SQW = 48;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pm_valid, u_valid;
  logic [SQW-1:0] pm, p_ref;
  ctrl_e u;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_hold = 0;

  power_comparator #(.SQW(SQW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_e e, last;
    longint a, r;
    pm_valid = 0; pm = '0; p_ref = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    last = CTRL_HOLD;
    for (int n = 0; n < 4000; n++) begin
      a = longint'({$urandom, $urandom}) & ((64'sd1 << SQW) - 1);
      case (n % 4)
        0: r = a;
        1: r = a + 1;
        2: r = (a > 0) ? a - 1 : a;
        default: r = longint'({$urandom, $urandom}) & ((64'sd1 << SQW) - 1);
      endcase
      @(negedge clk);
      pm_valid = (n % 5 != 4); pm = SQW'(a); p_ref = SQW'(r);
      e = (r > a) ? CTRL_UP : (r < a) ? CTRL_DOWN : CTRL_HOLD;
      if (!pm_valid) e = last;
      @(posedge clk); #1;
      checks++;
      if (u_valid != pm_valid || u != e) begin
        failures++;
        $display("FAIL pm=%0d ref=%0d got %s expected %s", a, r, u.name(), e.name());
      end
      if (pm_valid) begin
        if (e == CTRL_UP) n_up++; else if (e == CTRL_DOWN) n_down++; else n_hold++;
      end
      last = e;
    end
    checks++;
    if (n_up == 0 || n_down == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
