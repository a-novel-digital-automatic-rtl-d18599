// iq_mux_tb: self-checking test of the I/Q multiplexer.
//
// Random complex samples are offered with a random valid pattern. Every
// accepted sample is queued; the stream must carry its I word and then its
// Q word on the next two words, tagged 0 then 1, with the I word one cycle
// after acceptance. With in_valid held high the mux must accept exactly one
// sample every two cycles.
module iq_mux_tb;
  localparam int unsigned NI = 14;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, s_valid, s_is_q;
  logic signed [NI-1:0] in_i, in_q, s_data;
  int checks = 0, failures = 0;

  iq_mux #(.NI(NI)) dut (.*);

  always #5 clk = ~clk;

  logic signed [NI-1:0] exp_words[$];
  logic                 exp_tags[$];
  int accepted = 0, cycles_hi = 0;
  bit expect_i_next = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Monitor: compare every stream word with the queue.
  always @(posedge clk) if (rst_n) begin
    if (expect_i_next) begin
      check(s_valid && !s_is_q, "I word not one cycle after acceptance");
    end
    expect_i_next = in_valid && in_ready;
    if (s_valid) begin
      if (exp_words.size() == 0) check(1'b0, "unexpected word");
      else begin
        logic signed [NI-1:0] w;
        logic t;
        w = exp_words.pop_front();
        t = exp_tags.pop_front();
        check(s_data == w && s_is_q == t, $sformatf("word %0d/%0d got %0d/%0d", w, t, s_data, s_is_q));
      end
    end
    if (in_valid && in_ready) begin
      exp_words.push_back(in_i); exp_tags.push_back(1'b0);
      exp_words.push_back(in_q); exp_tags.push_back(1'b1);
      accepted++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; in_i = '0; in_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // random valid pattern
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (!(in_valid && !in_ready)) begin
        in_valid = ($urandom_range(0, 2) != 0);
        in_i = NI'($urandom);
        in_q = NI'($urandom);
      end
    end
    // back-to-back: count acceptances over 1000 cycles
    @(negedge clk);
    in_valid = 1'b1;
    begin
      int a0;
      @(posedge clk); #1;
      a0 = accepted;
      repeat (1000) begin
        @(negedge clk); in_i = NI'($urandom); in_q = NI'($urandom);
      end
      #1;
      check(accepted - a0 >= 499 && accepted - a0 <= 501, $sformatf("throughput %0d per 1000 cycles", accepted - a0));
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (5) @(posedge clk);
    check(exp_words.size() == 0, "words left over");
    check(accepted > 1000, "too few samples accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
