// gain_accumulator: the exponential gain register of the AGC.
//
// Structure as published: the register output G_m is shifted right by K
// (divided by 2^K) and added to or subtracted from itself under the control
// of u_m, so each update multiplies the gain by (1 +/- 2^-K). The gain thus
// changes by a fixed number of dB per update, which gives the loop its
// linear slew rate in dB. The register is held between the minimum 2^K
// (below which G/2^K would be zero and the gain could never grow again) and
// the maximum 2^P - 1, giving a gain range of about 6(P - K + 1) dB. The
// shift truncates, so the step is floor(G/2^K): 1 for G in [2^K, 2^(K+1)),
// 2 above that, and so on.
//
// Interface: one update per u_valid pulse; u = CTRL_HOLD leaves G unchanged.
// at_min / at_max report that the gain sits on a limit. Reset loads the
// minimum gain 2^K (this design's choice; the published simulation starts
// from the minimum gain).
// Timing: gain is the register output; it changes the cycle after u_valid.
module gain_accumulator #(
  parameter int unsigned P = agc_pkg::AGC_P,
  parameter int unsigned K = agc_pkg::AGC_K
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           u_valid,
  input  agc_pkg::ctrl_e u,
  output logic [P-1:0]   gain,
  output logic           at_min,
  output logic           at_max
);

  import agc_pkg::*;

  localparam logic [P:0] G_MIN = (P+1)'(1) << K;
  localparam logic [P:0] G_MAX = ((P+1)'(1) << P) - 1'b1;

  logic [P:0] g_ext;
  logic [P:0] step;
  logic [P:0] g_up;
  logic [P:0] g_down;
  logic [P-1:0] g_next;

  assign g_ext  = {1'b0, gain};
  assign step   = g_ext >> K;
  assign g_up   = g_ext + step;
  assign g_down = g_ext - step;

  always_comb begin
    unique case (u)
      CTRL_UP:   g_next = (g_up > G_MAX) ? G_MAX[P-1:0] : g_up[P-1:0];
      CTRL_DOWN: g_next = (g_down < G_MIN) ? G_MIN[P-1:0] : g_down[P-1:0];
      default:   g_next = gain;
    endcase
  end

  assign at_min = (g_ext == G_MIN);
  assign at_max = (g_ext == G_MAX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       gain <= G_MIN[P-1:0];
    else if (u_valid) gain <= g_next;
  end

  initial begin
    assert (K < P) else $error("gain_accumulator: K must be smaller than P");
  end

endmodule
