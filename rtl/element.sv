// element: the processing of one steered antenna element.
//
// Chains the interleaver (1-bit stream -> half-rate I/Q bits), the XNOR
// down-converter and the complex weight multiplier. Input is the element's
// delta-sigma bit at the main clock; outputs are the rotated baseband I'/Q'
// as W_W+1-bit signed numbers at half rate (updated on en2 edges).
// Latency: the interleaver register plus the two CWM stages. The baseband
// bits i_ddc/q_ddc are also brought out so that the complex weight
// multipliers of additional beams can share the interleaver and DDC.
module element
  import bf_pkg::*;
#(
  parameter int unsigned W_W = W_WIDTH   // weight width
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en2,
  input  logic                  lo,      // CLK/4
  input  logic                  in_bit,
  input  logic signed [W_W-1:0] cos_w,
  input  logic signed [W_W-1:0] sin_w,
  output logic signed [W_W:0]   i_out,
  output logic signed [W_W:0]   q_out,
  output logic                  i_ddc,   // baseband bits, shared with further beams
  output logic                  q_ddc
);

  logic i_bit, q_bit;

  interleaver u_il (.clk, .rst, .en2, .in_bit, .i_bit, .q_bit);
  ddc         u_ddc (.lo, .i_bit, .q_bit, .i_ddc, .q_ddc);
  cwm #(.W_W(W_W)) u_cwm (.clk, .rst, .en(en2), .i_bit(i_ddc), .q_bit(q_ddc),
                     .cos_w, .sin_w, .i_out, .q_out);

endmodule
