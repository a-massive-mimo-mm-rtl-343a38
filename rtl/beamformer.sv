// beamformer: bit-stream beamformer of a linear array up to the filter
// input, for one or more simultaneous beams.
//
// Element 0 is the unshifted reference; elements 1..N_ELEM-1 are rotated by
// their complex weights (for a half-wavelength linear array steered to angle
// psi, element k uses theta_k = k*pi*sin(psi)). The rotated I'/Q' words of all
// elements are summed by a pipelined adder tree into the BF_W-bit filter
// input; a sum that leaves that range wraps and raises `ovf` for that sample.
//
// Sizes: the defaults are the described receiver (4 elements, 4-bit weights,
// scale 6, 6-bit filter input). The scale study of the design also lists
// 8- and 16-element arrays (for example 8 elements: N = 7 bits with scale 6;
// 16 elements: N = 8 bits with scale 6) and weight widths of 3 to 8 bits;
// N_ELEM (a power of two), W_W, SCALE and BF_W select such a configuration.
//
// Beams: the interleaver and the down-converter of each element do not depend
// on the steering angle, so all beams share them. Beam 0 uses the multipliers
// inside the element blocks; every further beam adds its own four complex
// weight multipliers (fed with the shared baseband bits) and its own adder
// tree. NUM_BEAMS = 1 is the single-beam receiver.
//
// Timing: all registers load on the half-rate strobe en2. From a delta-sigma
// bit to the beamformer output: interleaver (1) + CWM (2) + adder tree
// (log2 N_ELEM) half-rate samples; for sample m (input bits of cycles 2m and
// 2m+1 after reset) the output changes on clock edge 2m + 5 + 2*log2(N_ELEM),
// which is 2m+9 for four elements. Reset: asynchronous, active high.
module beamformer
  import bf_pkg::*;
#(
  parameter int unsigned NUM_BEAMS = 1,
  parameter int unsigned N_ELEM    = NUM_ELEM,   // array elements
  parameter int unsigned W_W       = W_WIDTH,    // weight width
  parameter int signed   SCALE     = REF_SCALE,  // weight standing for 1.0
  parameter int unsigned BF_W      = BF_WIDTH    // filter input width N
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en2,
  input  logic                   lo,
  input  logic [N_ELEM-1:0]      in_bits,
  input  logic signed [W_W-1:0]  cos_w [NUM_BEAMS][1:N_ELEM-1],
  input  logic signed [W_W-1:0]  sin_w [NUM_BEAMS][1:N_ELEM-1],
  output logic signed [BF_W-1:0] i_bf  [NUM_BEAMS],
  output logic signed [BF_W-1:0] q_bf  [NUM_BEAMS],
  output logic                   ovf   [NUM_BEAMS]
);

  logic signed [W_W:0] ei [NUM_BEAMS][N_ELEM];
  logic signed [W_W:0] eq [NUM_BEAMS][N_ELEM];
  logic [N_ELEM-1:0] i_ddc, q_ddc;

  element_zero #(.SCALE(SCALE), .OUT_W(W_W + 1)) u_e0 (.clk, .rst, .en2, .lo, .in_bit(in_bits[0]),
                     .i_out(ei[0][0]), .q_out(eq[0][0]), .i_ddc(i_ddc[0]), .q_ddc(q_ddc[0]));

  for (genvar k = 1; k < N_ELEM; k++) begin : g_el
    element #(.W_W(W_W)) u_e (.clk, .rst, .en2, .lo, .in_bit(in_bits[k]),
                 .cos_w(cos_w[0][k]), .sin_w(sin_w[0][k]),
                 .i_out(ei[0][k]), .q_out(eq[0][k]), .i_ddc(i_ddc[k]), .q_ddc(q_ddc[k]));
  end

  for (genvar b = 1; b < NUM_BEAMS; b++) begin : g_beam
    cwm_zero #(.SCALE(SCALE), .OUT_W(W_W + 1)) u_c0 (.clk, .rst, .en(en2), .i_bit(i_ddc[0]), .q_bit(q_ddc[0]),
                   .i_out(ei[b][0]), .q_out(eq[b][0]));
    for (genvar k = 1; k < N_ELEM; k++) begin : g_cwm
      cwm #(.W_W(W_W)) u_c (.clk, .rst, .en(en2), .i_bit(i_ddc[k]), .q_bit(q_ddc[k]),
               .cos_w(cos_w[b][k]), .sin_w(sin_w[b][k]), .i_out(ei[b][k]), .q_out(eq[b][k]));
    end
  end

  for (genvar b = 0; b < NUM_BEAMS; b++) begin : g_sum
    adder_tree #(.N_IN(N_ELEM), .IN_W(W_W + 1), .OUT_W(BF_W)) u_sum (.clk, .rst, .en(en2), .ei(ei[b]), .eq(eq[b]),
                      .i_bf(i_bf[b]), .q_bf(q_bf[b]), .ovf(ovf[b]));
  end

endmodule
