// power_comparator: loop error sign, u_m = sgn(P_ref - P_m).
//
// Compares the averaged power P_m with the reference P_ref (both unsigned,
// in units of W_n^2 summed over I and Q) and tells the gain accumulator to
// raise the gain when the power is below the reference, lower it when it is
// above, and hold it when the two are equal (sgn(0) = 0). Only the sign of
// the error is used, so no subtractor output wider than one bit is needed.
//
// Timing: registered; u_valid pulses one cycle after pm_valid.
module power_comparator #(
  parameter int unsigned SQW = 2 * (agc_pkg::AGC_NI + agc_pkg::AGC_P)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pm_valid,
  input  logic [SQW-1:0]  pm,
  input  logic [SQW-1:0]  p_ref,
  output logic            u_valid,
  output agc_pkg::ctrl_e  u
);

  import agc_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_valid <= 1'b0;
      u       <= CTRL_HOLD;
    end else begin
      u_valid <= pm_valid;
      if (pm_valid) begin
        if (p_ref > pm)      u <= CTRL_UP;
        else if (p_ref < pm) u <= CTRL_DOWN;
        else                 u <= CTRL_HOLD;
      end
    end
  end

endmodule
