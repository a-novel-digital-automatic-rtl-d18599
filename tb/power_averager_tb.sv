// power_averager_tb: self-checking test of the M-sample power average.
//
// Feeds alternating I/Q square words (random values up to 2^46, random idle
// gaps) and keeps its own running sum. After every M-th Q word pm_valid must
// pulse exactly once, one cycle later, with pm = sum / M; at no other time
// may it pulse. A window of constant words must average to exactly
// I^2 + Q^2. Runs at the default window M = 128.
module power_averager_tb;
  localparam int unsigned SQW = 48, M = 128;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sq_valid, sq_is_q, pm_valid;
  logic [SQW-1:0] sq_data, pm;
  int checks = 0, failures = 0, windows = 0;

  power_averager #(.SQW(SQW), .M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint sum = 0;
  int     nq = 0;

  task automatic word(input longint v, input bit q, input bit random_data);
    bit close;
    @(negedge clk);
    sq_valid = 1; sq_is_q = q; sq_data = SQW'(v);
    sum += v;
    if (q) nq++;
    close = q && (nq == M);
    @(posedge clk); #1;
    @(negedge clk); sq_valid = 0;
    checks++;
    if (pm_valid != close) begin
      failures++; $display("FAIL pm_valid=%0d at word %0d of window", pm_valid, nq);
    end
    if (close) begin
      checks++;
      if (longint'(pm) != sum / longint'(M)) begin
        failures++; $display("FAIL pm=%0d expected %0d", pm, sum / longint'(M));
      end
      windows++;
      sum = 0; nq = 0;
    end
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    sq_valid = 0; sq_is_q = 0; sq_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // constant words: average equals I^2 + Q^2 exactly
    for (int n = 0; n < M; n++) begin
      word(246016, 1'b0, 1'b0);
      word(863041, 1'b1, 1'b0);
    end
    checks++;
    if (longint'(pm) != 1109057) begin failures++; $display("FAIL constant average %0d", pm); end
    // random words, largest possible values included
    for (int w = 0; w < 20; w++)
      for (int n = 0; n < M; n++) begin
        word((w == 3) ? (64'sd1 << 46) : longint'({$urandom, $urandom}) & ((64'sd1 << 46) - 1), 1'b0, 1'b1);
        word((w == 3) ? (64'sd1 << 46) : longint'({$urandom, $urandom}) & ((64'sd1 << 46) - 1), 1'b1, 1'b1);
      end
    checks++;
    if (windows != 21) begin failures++; $display("FAIL %0d windows", windows); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
