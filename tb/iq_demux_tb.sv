// iq_demux_tb: self-checking test of the I/Q demultiplexer.
//
// Sends random I/Q word pairs with random idle gaps (and gaps between the I
// and the Q word) and checks that each Q word produces exactly one
// out_valid pulse, one cycle later, carrying the preceding I word and the
// Q word.
module iq_demux_tb;
  localparam int unsigned NO = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic d_valid, d_is_q, out_valid;
  logic signed [NO-1:0] d_data, out_i, out_q;
  int checks = 0, failures = 0, pulses = 0;

  iq_demux #(.NO(NO)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out_valid) pulses++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [NO-1:0] ei, eq;
    d_valid = 0; d_is_q = 0; d_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      ei = NO'($urandom); eq = NO'($urandom);
      @(negedge clk); d_valid = 1; d_is_q = 0; d_data = ei;
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin failures++; $display("FAIL pulse on I word"); end
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk); d_valid = 0; d_data = NO'($urandom);
      end
      @(negedge clk); d_valid = 1; d_is_q = 1; d_data = eq;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_i != ei || out_q != eq) begin
        failures++;
        $display("FAIL pair %0d/%0d got %0d/%0d v=%0d", ei, eq, out_i, out_q, out_valid);
      end
      @(negedge clk); d_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    @(posedge clk); #1;
    checks++;
    if (pulses != 2000) begin failures++; $display("FAIL %0d pulses", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
