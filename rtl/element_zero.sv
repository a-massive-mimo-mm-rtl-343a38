// element_zero: the processing of the reference antenna element 0.
//
// Same chain as `element` (interleaver, XNOR down-converter) but with the
// fixed-weight multiplier cwm_zero, since element 0 carries no phase shift.
// Outputs are +/-SCALE at half rate with the same latency as `element`;
// the baseband bits i_ddc/q_ddc are brought out for additional beams.
module element_zero
  import bf_pkg::*;
#(
  parameter int signed   SCALE = REF_SCALE,  // value standing for 1.0
  parameter int unsigned OUT_W = CWM_WIDTH
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en2,
  input  logic                    lo,
  input  logic                    in_bit,
  output logic signed [OUT_W-1:0] i_out,
  output logic signed [OUT_W-1:0] q_out,
  output logic                    i_ddc,   // baseband bits, shared with further beams
  output logic                    q_ddc
);

  logic i_bit, q_bit;

  interleaver u_il (.clk, .rst, .en2, .in_bit, .i_bit, .q_bit);
  ddc         u_ddc (.lo, .i_bit, .q_bit, .i_ddc, .q_ddc);
  cwm_zero #(.SCALE(SCALE), .OUT_W(OUT_W)) u_cwm (.clk, .rst, .en(en2), .i_bit(i_ddc), .q_bit(q_ddc), .i_out, .q_out);

endmodule
