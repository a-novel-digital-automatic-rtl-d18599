// power_averager: block average of the measured power over M complex samples.
//
// The squares of the I and Q words are summed over a window of M complex
// samples (2*M words, the window closing on the M-th Q word) and the sum is
// divided by M, giving P_m, the mean of I^2 + Q^2 of the amplified signal.
// One P_m is produced per window, matching the gain update "every M sample
// period" of the published algorithm. The block (integrate-and-dump)
// average and the restriction of M to a power of two, so that the division
// is a shift, are this design's choices; the published design names the
// averager without giving its structure. The shift drops no information
// for a constant input, so P_m is then exactly (I^2 + Q^2) * G^2.
//
// Timing: pm is registered and pm_valid pulses for one cycle, one clock
// after the square word that closes the window.
module power_averager #(
  parameter int unsigned SQW = 2 * (agc_pkg::AGC_NI + agc_pkg::AGC_P),
  parameter int unsigned M   = agc_pkg::AGC_M
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sq_valid,
  input  logic           sq_is_q,
  input  logic [SQW-1:0] sq_data,
  output logic           pm_valid,
  output logic [SQW-1:0] pm
);

  localparam int unsigned LOGM = $clog2(M);
  localparam int unsigned ACCW = SQW + LOGM + 1;
  localparam int unsigned CNTW = LOGM + 1;

  logic [ACCW-1:0] acc;
  logic [ACCW-1:0] sum;
  logic [CNTW-1:0] cnt;
  logic            last;

  assign sum  = acc + ACCW'(sq_data);
  assign last = sq_valid && sq_is_q && (cnt == CNTW'(M - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      cnt      <= '0;
      pm       <= '0;
      pm_valid <= 1'b0;
    end else begin
      pm_valid <= 1'b0;
      if (last) begin
        pm       <= SQW'(sum >> LOGM);
        pm_valid <= 1'b1;
        acc      <= '0;
        cnt      <= '0;
      end else if (sq_valid) begin
        acc <= sum;
        if (sq_is_q) cnt <= cnt + 1'b1;
      end
    end
  end

  initial begin
    assert (M >= 2 && (1 << LOGM) == M)
      else $error("power_averager: M must be a power of two, at least 2");
  end

endmodule
