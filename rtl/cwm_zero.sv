// cwm_zero: complex weight multiplier of the reference element 0.
//
// Element 0 is never phase shifted (cos = 1, sin = 0), so its multiplier
// reduces to I' = I*S and Q' = Q*S, where S is the scale that stands for 1.0
// in the weights of the other elements (REF_SCALE = 6 for 4-bit weights).
// OUT_W matches the output width of the steered elements' multipliers.
// Each output is a 2:1 mux between +S and -S; there are no adders.
//
// Timing: two half-rate register stages, the same latency as cwm, so the
// four element outputs stay aligned at the adder tree.
// Reset: asynchronous, active high.
module cwm_zero
  import bf_pkg::*;
#(
  parameter int signed   SCALE = REF_SCALE,
  parameter int unsigned OUT_W = CWM_WIDTH
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    i_bit,
  input  logic                    q_bit,
  output logic signed [OUT_W-1:0] i_out,
  output logic signed [OUT_W-1:0] q_out
);

  typedef logic signed [OUT_W-1:0] out_t;

  localparam out_t POS = out_t'(SCALE);
  localparam out_t NEG = out_t'(-SCALE);

  out_t i_r, q_r;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      i_r   <= '0;
      q_r   <= '0;
      i_out <= '0;
      q_out <= '0;
    end else if (en) begin
      i_r   <= i_bit ? POS : NEG;
      q_r   <= q_bit ? POS : NEG;
      i_out <= i_r;
      q_out <= q_r;
    end
  end

endmodule
