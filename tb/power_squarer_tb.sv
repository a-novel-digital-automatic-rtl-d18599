// power_squarer_tb: self-checking test of the power square multiplier.
//
// Checks W^2 against a 64-bit integer reference for random 24-bit products,
// the extremes of the range and zero, with valid and tag delayed by one
// cycle.
module power_squarer_tb;
  localparam int unsigned NW = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  logic w_valid, w_is_q, sq_valid, sq_is_q;
  logic signed [NW-1:0] w_data;
  logic [2*NW-1:0] sq_data;
  int checks = 0, failures = 0;

  power_squarer #(.NW(NW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint w, e;
    bit ev, eq;
    w_valid = 0; w_is_q = 0; w_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      case (n)
        0: w = -(64'sd1 << (NW - 1));
        1: w = (64'sd1 << (NW - 1)) - 1;
        2: w = 0;
        3: w = -1;
        default: w = longint'($signed(NW'($urandom)));
      endcase
      @(negedge clk);
      w_valid = ($urandom_range(0, 3) != 0) || n < 4; w_is_q = 1'($urandom_range(0, 1));
      w_data = NW'(w);
      e = w * w; ev = w_valid; eq = w_is_q;
      @(posedge clk); #1;
      checks++;
      if (sq_valid != ev || sq_is_q != eq || (ev && longint'(sq_data) != e)) begin
        failures++;
        $display("FAIL W=%0d got %0d expected %0d", w, sq_data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
