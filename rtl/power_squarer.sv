// power_squarer: the power-measurement square multiplier, sq_n = W_n^2.
//
// Squares the full-precision signed product W_n. The result is non-negative
// and below 2^(2*NW-2), so it is returned as an unsigned 2*NW-bit word.
// Because I and Q words take turns on the stream, two consecutive squares
// add up to the instantaneous power I^2 + Q^2 of one complex sample.
//
// Timing: one register stage; valid and the I/Q tag travel with the data.
module power_squarer #(
  parameter int unsigned NW = agc_pkg::AGC_NI + agc_pkg::AGC_P
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 w_valid,
  input  logic                 w_is_q,
  input  logic signed [NW-1:0] w_data,
  output logic                 sq_valid,
  output logic                 sq_is_q,
  output logic [2*NW-1:0]      sq_data
);

  logic signed [2*NW-1:0] square;

  assign square = w_data * w_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq_valid <= 1'b0;
      sq_is_q  <= 1'b0;
      sq_data  <= '0;
    end else begin
      sq_valid <= w_valid;
      sq_is_q  <= w_is_q;
      if (w_valid) sq_data <= unsigned'(square);
    end
  end

endmodule
