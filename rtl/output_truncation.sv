// output_truncation: reduces the AGC product W_n to the NO-bit output word.
//
// The published design obtains the output by truncating W_n to NO bits.
// This block keeps the NO bits W_n[LSB+NO-1 : LSB] and drops the bits below
// them (floor, no rounding). LSB defaults to K + NI - NO: with the gain at
// its minimum 2^K (unity) the output is then exactly the NO most significant
// bits of the NI-bit input, D[13:9] for the 14-bit/5-bit case, and the
// figures published for the constant input {I, Q} = {496, 929} are
// reproduced (e.g. 929 * 720 >> 16 = 10). The choice of slice is this
// design's reading of those numbers. When the bits above the slice are not
// all copies of its sign bit the word would wrap; it is instead clamped to
// the largest positive or negative NO-bit value and o_clip is raised. The
// clamp is this design's choice.
//
// Timing: one register stage; valid and the I/Q tag travel with the data.
module output_truncation #(
  parameter int unsigned NW  = agc_pkg::AGC_NI + agc_pkg::AGC_P,
  parameter int unsigned NO  = agc_pkg::AGC_NO,
  parameter int unsigned LSB = agc_pkg::AGC_K + agc_pkg::AGC_NI - agc_pkg::AGC_NO
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 w_valid,
  input  logic                 w_is_q,
  input  logic signed [NW-1:0] w_data,
  output logic                 o_valid,
  output logic                 o_is_q,
  output logic signed [NO-1:0] o_data,
  output logic                 o_clip
);

  // Bits from the top of the slice upwards must all equal the sign bit.
  localparam int unsigned TOPW = NW - (LSB + NO - 1);

  logic [TOPW-1:0]      top_bits;
  logic                 overflow;
  logic signed [NO-1:0] sliced;
  logic signed [NO-1:0] clamped;

  assign top_bits = w_data[NW-1 : LSB+NO-1];
  assign overflow = !((&top_bits) || !(|top_bits));
  assign sliced   = w_data[LSB+NO-1 : LSB];

  always_comb begin
    if (!overflow)          clamped = sliced;
    else if (w_data[NW-1])  clamped = {1'b1, {(NO-1){1'b0}}};
    else                    clamped = {1'b0, {(NO-1){1'b1}}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      o_is_q  <= 1'b0;
      o_data  <= '0;
      o_clip  <= 1'b0;
    end else begin
      o_valid <= w_valid;
      o_is_q  <= w_is_q;
      o_clip  <= w_valid && overflow;
      if (w_valid) o_data <= clamped;
    end
  end

endmodule
