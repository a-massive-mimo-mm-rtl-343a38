// ddc: digital down conversion of the interleaved I/Q bits to baseband.
//
// At half rate both the in-phase and the delayed (quadrature) stream must be
// multiplied by the IF sequence +1, -1, +1, ... . With bits coding +1 as 1 and
// -1 as 0 that product is an XNOR, and the alternating sequence is simply the
// CLK/4 square wave, which is constant over each two-cycle half-rate sample.
// Both streams use the same local-oscillator bit, so no inverted clock is
// needed. Purely combinational, no reset.
module ddc (
  input  logic lo,      // CLK/4 from clk_div: 1 = +1, 0 = -1
  input  logic i_bit,
  input  logic q_bit,
  output logic i_ddc,
  output logic q_ddc
);

  assign i_ddc = ~(i_bit ^ lo);
  assign q_ddc = ~(q_bit ^ lo);

endmodule
