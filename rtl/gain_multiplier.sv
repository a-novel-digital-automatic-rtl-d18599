// gain_multiplier: W_n = x_n * G_m, the gain stage of the AGC.
//
// The multiplexed input word x_n is a signed NI-bit integer and the gain G_m
// from the gain accumulator an unsigned P-bit integer; their product W_n is
// a signed (NI+P)-bit integer, exactly as in the published block diagram.
// No bits are dropped here: the output truncation and the power measurement
// both work from the full product.
//
// Timing: one register stage. The valid flag and the I/Q tag travel with the
// product, so w_* belong to the input presented one cycle earlier. The
// pipeline register is this design's choice.
module gain_multiplier #(
  parameter int unsigned NI = agc_pkg::AGC_NI,
  parameter int unsigned P  = agc_pkg::AGC_P
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   x_valid,
  input  logic                   x_is_q,
  input  logic signed [NI-1:0]   x_data,
  input  logic        [P-1:0]    gain,
  output logic                   w_valid,
  output logic                   w_is_q,
  output logic signed [NI+P-1:0] w_data
);

  // Zero-extend the unsigned gain by one bit so the product is signed.
  logic signed [P:0]      gain_s;
  logic signed [NI+P-1:0] product;

  assign gain_s  = signed'({1'b0, gain});
  assign product = x_data * gain_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_valid <= 1'b0;
      w_is_q  <= 1'b0;
      w_data  <= '0;
    end else begin
      w_valid <= x_valid;
      w_is_q  <= x_is_q;
      if (x_valid) w_data <= product;
    end
  end

endmodule
