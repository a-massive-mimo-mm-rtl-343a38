// cwm: complex weight multiplier of one steered element.
//
// Rotates a baseband I/Q pair of 1-bit values (1 = +1, 0 = -1) by the angle
// whose scaled cosine and sine are the signed weights cos_w and sin_w:
//     I' = I*cos + Q*sin,    Q' = Q*cos - I*sin.
// Because I and Q are +/-1, each product is a 2:1 mux between the weight and
// its negation; four muxes and two adders make the whole multiplier.
//
// Pipeline (the deeper of the described pipelining steps): the four mux
// outputs are registered, then the two sums are registered, so the result
// appears two half-rate samples after its input. Both registers load only on
// the half-rate strobe `en`.
//
// Weights are symmetric signed W_W-bit numbers in [-(2^(W_W-1)-1), 2^(W_W-1)-1];
// the most negative code is not used, which keeps every sum inside the
// W_W+1-bit output. An assertion flags it. W_W defaults to the described
// 4 bits; the weight-width study of the design (3 to 8 bits) maps onto it.
// Reset: asynchronous, active high.
module cwm
  import bf_pkg::*;
#(
  parameter int unsigned W_W = W_WIDTH
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic                 i_bit,
  input  logic                 q_bit,
  input  logic signed [W_W-1:0] cos_w,
  input  logic signed [W_W-1:0] sin_w,
  output logic signed [W_W:0]   i_out,
  output logic signed [W_W:0]   q_out
);

  typedef logic signed [W_W:0] prod_t;

  prod_t ic, qs, qc, is_n;      // I*cos, Q*sin, Q*cos, -(I*sin)
  prod_t ic_r, qs_r, qc_r, is_r;

  always_comb begin
    ic   = i_bit ? prod_t'(cos_w) : -prod_t'(cos_w);
    qs   = q_bit ? prod_t'(sin_w) : -prod_t'(sin_w);
    qc   = q_bit ? prod_t'(cos_w) : -prod_t'(cos_w);
    is_n = i_bit ? -prod_t'(sin_w) : prod_t'(sin_w);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ic_r  <= '0;
      qs_r  <= '0;
      qc_r  <= '0;
      is_r  <= '0;
      i_out <= '0;
      q_out <= '0;
    end else if (en) begin
      ic_r  <= ic;
      qs_r  <= qs;
      qc_r  <= qc;
      is_r  <= is_n;
      i_out <= ic_r + qs_r;
      q_out <= qc_r + is_r;
    end
  end

  a_weight_range: assert property (@(posedge clk) disable iff (rst)
    cos_w != {1'b1, {(W_W-1){1'b0}}} && sin_w != {1'b1, {(W_W-1){1'b0}}});

endmodule
