// output_truncation_tb: self-checking test of the NO-bit output slice.
//
// Reference: out = floor(W / 2^16) clamped to [-16, 15], clip flagged when
// the clamp acts. Checks random products over the whole 24-bit range, small
// products near the slice, the boundaries of the clamp, and the two values
// of the published convergence example (496 * 720 -> 5, 929 * 720 -> 10).
module output_truncation_tb;
  localparam int unsigned NW = 24, NO = 5, LSB = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic w_valid, w_is_q, o_valid, o_is_q, o_clip;
  logic signed [NW-1:0] w_data;
  logic signed [NO-1:0] o_data;
  int checks = 0, failures = 0, clips = 0;

  output_truncation #(.NW(NW), .NO(NO), .LSB(LSB)) dut (.*);

  always #5 clk = ~clk;

  task automatic apply(input longint w);
    longint q, e;
    bit     c;
    @(negedge clk);
    w_valid = 1'b1; w_is_q = w[0]; w_data = NW'(w);
    // floor division by 2^LSB, independent of the bit slicing
    q = (w >= 0) ? w / (64'sd1 << LSB) : -((-w + (64'sd1 << LSB) - 1) / (64'sd1 << LSB));
    c = (q > 15) || (q < -16);
    e = (q > 15) ? 15 : (q < -16) ? -16 : q;
    @(posedge clk); #1;
    checks++;
    if (!o_valid || o_is_q != w[0] || longint'(o_data) != e || o_clip != c) begin
      failures++;
      $display("FAIL W=%0d: got %0d clip=%0d, expected %0d clip=%0d", w, o_data, o_clip, e, c);
    end
    if (o_clip) clips++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_valid = 0; w_is_q = 0; w_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    apply(496 * 720);
    checks++; if (o_data != 5) failures++;
    apply(929 * 720);
    checks++; if (o_data != 10) failures++;
    apply(-929 * 720);
    for (longint v = -17 * 65536 - 3; v <= 17 * 65536 + 3; v += 4099) apply(v);
    apply(15 * 65536 + 65535); apply(16 * 65536); apply(-16 * 65536); apply(-16 * 65536 - 1);
    apply(-(64'sd1 << 23)); apply((64'sd1 << 23) - 1);
    for (int n = 0; n < 3000; n++) apply(longint'($signed(NW'($urandom))));
    for (int n = 0; n < 1000; n++) apply(longint'($signed(21'($urandom))));
    checks++;
    if (clips == 0) begin failures++; $display("FAIL clamp never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
