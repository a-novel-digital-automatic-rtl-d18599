// gain_multiplier_tb: self-checking test of W = x * G.
//
// Drives random signed inputs (including the extremes) and random unsigned
// gains for three thousand cycles and checks, one cycle later, the product
// against a 64-bit integer reference, and that valid and the I/Q tag are
// delayed by exactly one cycle.
module gain_multiplier_tb;
  localparam int unsigned NI = 14, P = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic x_valid, x_is_q, w_valid, w_is_q;
  logic signed [NI-1:0] x_data;
  logic [P-1:0] gain;
  logic signed [NI+P-1:0] w_data;
  int checks = 0, failures = 0;

  gain_multiplier #(.NI(NI), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_w;
    bit     exp_v, exp_q;
    x_valid = 0; x_is_q = 0; x_data = '0; gain = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      x_valid = ($urandom_range(0, 3) != 0);
      x_is_q  = 1'($urandom_range(0, 1));
      case (n % 5)
        0: x_data = {1'b1, {(NI-1){1'b0}}};   // most negative
        1: x_data = {1'b0, {(NI-1){1'b1}}};   // most positive
        default: x_data = NI'($urandom);
      endcase
      gain = (n % 7 == 0) ? '1 : P'($urandom);
      exp_w = longint'(x_data) * longint'(gain);
      exp_v = x_valid; exp_q = x_is_q;
      @(posedge clk); #1;
      checks++;
      if (w_valid != exp_v || w_is_q != exp_q || (exp_v && longint'(w_data) != exp_w)) begin
        failures++;
        $display("FAIL x=%0d g=%0d: got %0d expected %0d", x_data, gain, w_data, exp_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
