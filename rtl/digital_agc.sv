// digital_agc: closed-loop digital automatic gain control for a WCDMA
// receiver, normalising 14-bit baseband I/Q to a 5-bit output without any
// log, antilog or square-root arithmetic.
//
// Loop (published structure):
//   {I, Q} -> iq_mux -> gain_multiplier (W = x * G) -+-> output_truncation
//                                                     |     -> iq_demux -> {I_o, Q_o}
//                                                     +-> power_squarer (W^2)
//                                                           -> power_averager (P_m)
//                                                           -> power_comparator
//                                                              u = sgn(P_ref - P_m)
//                                                           -> gain_accumulator (G)
// Every M complex samples the gain is multiplied by (1 + 2^-K) if the
// average output power is below P_ref, by (1 - 2^-K) if above, and kept if
// equal, inside [2^K, 2^P - 1]. The gain slews at a constant rate in dB,
// 2^K * M / (8.68 * R) seconds per dB for a complex sample rate R.
//
// Interface: a complex sample is taken when in_valid && in_ready (at most
// one every two clocks, since I and Q share the multipliers). p_ref is the
// target mean of I^2 + Q^2 in units of the full product W (an output LSB is
// 2^LSB product units, LSB = K + NI - NO). out_valid pulses once per complex
// sample with the NO-bit output pair; out_clip flags an output word that
// was clamped. gain, pm/pm_valid and at_min/at_max expose the loop state.
// Timing: out_valid rises 4 clocks after the edge that accepts the sample.
// The gain register changes 4 clocks after the product of a window's last
// Q word is registered, so samples already in the multiplier then still see
// the old gain.
//
// The word sizes NI = 14 and NO = 5 follow the published system; P, K and M
// are this design's reading of the published convergence curve, and the
// handshake, pipeline registers and output clamp are this design's own.
module digital_agc #(
  parameter int unsigned NI = agc_pkg::AGC_NI,
  parameter int unsigned NO = agc_pkg::AGC_NO,
  parameter int unsigned P  = agc_pkg::AGC_P,
  parameter int unsigned K  = agc_pkg::AGC_K,
  parameter int unsigned M  = agc_pkg::AGC_M,
  localparam int unsigned NW  = NI + P,
  localparam int unsigned SQW = 2 * NW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [NI-1:0] in_i,
  input  logic signed [NI-1:0] in_q,
  input  logic [SQW-1:0]       p_ref,
  output logic                 out_valid,
  output logic signed [NO-1:0] out_i,
  output logic signed [NO-1:0] out_q,
  output logic                 out_clip,
  output logic [P-1:0]         gain,
  output logic                 pm_valid,
  output logic [SQW-1:0]       pm,
  output logic                 at_min,
  output logic                 at_max
);

  import agc_pkg::*;

  localparam int unsigned LSB = K + NI - NO;

  // multiplexed input stream
  logic                 s_valid, s_is_q;
  logic signed [NI-1:0] s_data;
  // product W_n
  logic                 w_valid, w_is_q;
  logic signed [NW-1:0] w_data;
  // truncated stream
  logic                 o_valid, o_is_q, o_clip;
  logic signed [NO-1:0] o_data;
  // power path
  logic                 sq_valid, sq_is_q;
  logic [SQW-1:0]       sq_data;
  logic                 u_valid;
  ctrl_e                u;
  logic                 clip_q;

  iq_mux #(.NI(NI)) u_mux (
    .clk, .rst_n, .in_valid, .in_ready, .in_i, .in_q,
    .s_valid, .s_is_q, .s_data
  );

  gain_multiplier #(.NI(NI), .P(P)) u_mult (
    .clk, .rst_n,
    .x_valid(s_valid), .x_is_q(s_is_q), .x_data(s_data), .gain,
    .w_valid, .w_is_q, .w_data
  );

  output_truncation #(.NW(NW), .NO(NO), .LSB(LSB)) u_trunc (
    .clk, .rst_n, .w_valid, .w_is_q, .w_data,
    .o_valid, .o_is_q, .o_data, .o_clip
  );

  iq_demux #(.NO(NO)) u_demux (
    .clk, .rst_n,
    .d_valid(o_valid), .d_is_q(o_is_q), .d_data(o_data),
    .out_valid, .out_i, .out_q
  );

  power_squarer #(.NW(NW)) u_square (
    .clk, .rst_n, .w_valid, .w_is_q, .w_data,
    .sq_valid, .sq_is_q, .sq_data
  );

  power_averager #(.SQW(SQW), .M(M)) u_avg (
    .clk, .rst_n, .sq_valid, .sq_is_q, .sq_data,
    .pm_valid, .pm
  );

  power_comparator #(.SQW(SQW)) u_cmp (
    .clk, .rst_n, .pm_valid, .pm, .p_ref,
    .u_valid, .u
  );

  gain_accumulator #(.P(P), .K(K)) u_gain (
    .clk, .rst_n, .u_valid, .u,
    .gain, .at_min, .at_max
  );

  // A pair is flagged clipped if either of its words was clamped.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clip_q   <= 1'b0;
      out_clip <= 1'b0;
    end else begin
      if (o_valid && !o_is_q) clip_q <= o_clip;
      if (o_valid && o_is_q)  out_clip <= clip_q || o_clip;
    end
  end

endmodule
