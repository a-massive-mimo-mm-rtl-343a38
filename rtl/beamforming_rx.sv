// beamforming_rx: four-element digital beamforming receiver built on
// bit-stream processing.
//
// Each antenna element delivers a 1-bit stream from a bandpass delta-sigma ADC
// sampled at `clk` (Fs), with the IF at Fs/4. Instead of decimating every ADC
// output and multiplying multi-bit samples, the receiver works on the 1-bit
// streams directly: interleaving, down conversion and phase shifting are
// muxes and XNOR gates, and only the summed beam is decimated (one decimator
// for I and one for Q per beam; ratio 32 after the interleaver's ratio 2, so
// the output rate is Fs/64).
//
// Ports: in_bits[k] is element k's delta-sigma bit (1 = +1, 0 = -1).
// cos_w[b][k]/sin_w[b][k] (k = 1..N_ELEM-1) are the scaled cosine/sine of element k's
// phase theta_k = k*pi*sin(psi_b) for beam b; element 0 is the reference and
// needs no weights. i_out[b]/q_out[b] are the OUT_W-bit (38) decimated baseband I/Q
// words of beam b, held between updates; out_valid is high for the one clock
// cycle in which a new output word first appears. bf_ovf[b] flags a
// beamformer sum of beam b that wrapped (a "forbidden" weight set).
// NUM_BEAMS = 1 (the default) is the single-beam receiver; each extra beam
// adds complex weight multipliers, an adder tree and two decimators.
//
// Sizes: the defaults are the described receiver (N_ELEM = 4 elements,
// W_W = 4-bit weights, SCALE = 6, BF_W = 6-bit filter input, OUT_W = 38).
// The other array sizes and weight widths of the described scale study are
// reached through these parameters (for example 8 elements with BF_W = 7);
// the filter word widths follow BF_W, and the beamformer latency grows by
// one half-rate sample per doubling of N_ELEM.
//
// One clock domain: clk_div produces strobes at Fs/2, Fs/16, Fs/32 and Fs/64
// and the CLK/4 local oscillator; every register runs on clk. The reset is
// asynchronous and active high. Latency from an ADC bit to the output word
// that first contains it: at most 64 clocks plus the filter group delays.
module beamforming_rx
  import bf_pkg::*;
#(
  parameter int unsigned NUM_BEAMS = 1,
  parameter int unsigned N_ELEM    = NUM_ELEM,   // array elements (power of two)
  parameter int unsigned W_W       = W_WIDTH,    // weight width
  parameter int signed   SCALE     = REF_SCALE,  // weight standing for 1.0
  parameter int unsigned BF_W      = BF_WIDTH,   // filter input width N
  parameter int unsigned OUT_W     = BF_W + COMB_GROWTH + 2 * HB_GROWTH
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [N_ELEM-1:0]       in_bits,
  input  logic signed [W_W-1:0]   cos_w [NUM_BEAMS][1:N_ELEM-1],
  input  logic signed [W_W-1:0]   sin_w [NUM_BEAMS][1:N_ELEM-1],
  output logic signed [OUT_W-1:0] i_out [NUM_BEAMS],
  output logic signed [OUT_W-1:0] q_out [NUM_BEAMS],
  output logic                    out_valid,
  output logic                    bf_ovf [NUM_BEAMS]
);

  localparam int unsigned C_W  = BF_W + COMB_GROWTH;
  localparam int unsigned H1_W = C_W + HB_GROWTH;

  logic clk2, clk4, clk16, clk32, clk64;
  logic en2, en16, en32, en64;
  logic signed [BF_W-1:0] i_bf [NUM_BEAMS];
  logic signed [BF_W-1:0] q_bf [NUM_BEAMS];
  logic signed [C_W-1:0]  i_comb [NUM_BEAMS];
  logic signed [C_W-1:0]  q_comb [NUM_BEAMS];
  logic signed [H1_W-1:0] i_hb1 [NUM_BEAMS];
  logic signed [H1_W-1:0] q_hb1 [NUM_BEAMS];
  logic [NUM_BEAMS-1:0]   i_valid, q_valid;

  clk_div u_clk_div (.clk, .rst, .clk2, .clk4, .clk16, .clk32, .clk64,
                     .en2, .en16, .en32, .en64);

  beamformer #(.NUM_BEAMS(NUM_BEAMS), .N_ELEM(N_ELEM), .W_W(W_W), .SCALE(SCALE),
               .BF_W(BF_W)) u_bf (
    .clk, .rst, .en2, .lo(clk4), .in_bits, .cos_w, .sin_w, .i_bf, .q_bf, .ovf(bf_ovf));

  for (genvar b = 0; b < NUM_BEAMS; b++) begin : g_dec
    decimator #(.IN_W(BF_W)) u_dec_i (.clk, .rst, .en2, .en16, .en32, .en64, .x(i_bf[b]),
                       .comb_y(i_comb[b]), .hb1_y(i_hb1[b]), .y(i_out[b]), .valid(i_valid[b]));
    decimator #(.IN_W(BF_W)) u_dec_q (.clk, .rst, .en2, .en16, .en32, .en64, .x(q_bf[b]),
                       .comb_y(q_comb[b]), .hb1_y(q_hb1[b]), .y(q_out[b]), .valid(q_valid[b]));
  end

  // all decimators run on the same strobes, so their valid pulses coincide
  assign out_valid = i_valid[0];

endmodule
