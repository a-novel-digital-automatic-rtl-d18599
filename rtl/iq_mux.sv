// iq_mux: time-multiplexes complex samples onto one real-valued stream.
//
// The AGC uses a single gain multiplier and a single square multiplier for
// both rails, so each complex input sample {I, Q} is sent down the datapath
// as two consecutive words, I first and Q second. The word is tagged with
// s_is_q so that the demultiplexer and the averager know which rail it is.
//
// Interface: a complex sample is accepted when in_valid && in_ready. The Q
// word is held in a register for one cycle while the I word goes out, so
// in_ready is low in that cycle: the block accepts at most one complex
// sample every two clock cycles (the original system clocks at 16 times the
// chip rate with samples at twice the chip rate, i.e. 8 cycles per sample).
// Timing: s_* are registered; the I word appears one cycle after acceptance,
// the Q word the cycle after that. The handshake and the I-then-Q order are
// this design's choices; the multiplexing itself is the published structure.
module iq_mux #(
  parameter int unsigned NI = agc_pkg::AGC_NI
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [NI-1:0] in_i,
  input  logic signed [NI-1:0] in_q,
  output logic                 s_valid,
  output logic                 s_is_q,
  output logic signed [NI-1:0] s_data
);

  logic                 q_pending;
  logic signed [NI-1:0] q_hold;

  assign in_ready = !q_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_pending <= 1'b0;
      q_hold    <= '0;
      s_valid   <= 1'b0;
      s_is_q    <= 1'b0;
      s_data    <= '0;
    end else if (q_pending) begin
      s_valid   <= 1'b1;
      s_is_q    <= 1'b1;
      s_data    <= q_hold;
      q_pending <= 1'b0;
    end else if (in_valid) begin
      s_valid   <= 1'b1;
      s_is_q    <= 1'b0;
      s_data    <= in_i;
      q_hold    <= in_q;
      q_pending <= 1'b1;
    end else begin
      s_valid   <= 1'b0;
      s_is_q    <= 1'b0;
    end
  end

endmodule
