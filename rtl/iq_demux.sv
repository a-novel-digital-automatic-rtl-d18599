// iq_demux: rebuilds the complex output sample {I_o, Q_o} from the stream.
//
// Words arrive tagged I or Q, I first. An I word is held; the Q word that
// follows completes the pair, which is presented on out_i/out_q with a
// one-cycle out_valid pulse. The output pair therefore changes once per
// complex sample, as the published demultiplexer does; the holding register
// and the valid pulse are this design's choices.
//
// Timing: out_* are registered and appear one cycle after the Q word.
// An assertion checks the stream rule that I and Q words alternate, I first.
module iq_demux #(
  parameter int unsigned NO = agc_pkg::AGC_NO
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 d_valid,
  input  logic                 d_is_q,
  input  logic signed [NO-1:0] d_data,
  output logic                 out_valid,
  output logic signed [NO-1:0] out_i,
  output logic signed [NO-1:0] out_q
);

  logic signed [NO-1:0] i_hold;
  logic                 have_i;   // an I word is waiting for its Q word

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_hold    <= '0;
      have_i    <= 1'b0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (d_valid && !d_is_q) begin
        i_hold <= d_data;
        have_i <= 1'b1;
      end else if (d_valid && d_is_q) begin
        have_i    <= 1'b0;
        out_i     <= i_hold;
        out_q     <= d_data;
        out_valid <= 1'b1;
      end
    end
  end

  a_alternate: assert property (@(posedge clk) disable iff (!rst_n)
                                d_valid |-> (d_is_q == have_i))
    else $error("iq_demux: I and Q words must alternate, I first");

endmodule
