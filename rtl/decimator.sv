// decimator: three-stage decimation filter, overall ratio 32.
//
// comb (sinc^4, /8, +12 bits) -> half-band (/2, +10 bits) -> half-band
// (/2, +10 bits). With the default 6-bit beamformer word the stage outputs are
// 18, 28 and 38 bits. The first stage decimates the half-rate beamformer
// output to CLK/16, the half-bands to CLK/32 and CLK/64. Each stage loads its
// output register on the strobe of its own output rate; `valid` is high in
// the main-clock cycle after the final output register has been loaded.
// Reset: asynchronous, active high.
module decimator
  import bf_pkg::*;
#(
  parameter int unsigned IN_W = BF_WIDTH,
  parameter int unsigned C_W  = IN_W + COMB_GROWTH,
  parameter int unsigned H1_W = C_W + HB_GROWTH,
  parameter int unsigned H2_W = H1_W + HB_GROWTH
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en2,
  input  logic                   en16,
  input  logic                   en32,
  input  logic                   en64,
  input  logic signed [IN_W-1:0] x,
  output logic signed [C_W-1:0]  comb_y,
  output logic signed [H1_W-1:0] hb1_y,
  output logic signed [H2_W-1:0] y,
  output logic                   valid
);

  comb_decimator #(.IN_W(IN_W), .OUT_W(C_W)) u_comb (
    .clk, .rst, .en_in(en2), .en_out(en16), .x, .y(comb_y));

  halfband_decimator #(.IN_W(C_W), .OUT_W(H1_W)) u_hb1 (
    .clk, .rst, .en_in(en16), .en_out(en32), .x(comb_y), .y(hb1_y));

  halfband_decimator #(.IN_W(H1_W), .OUT_W(H2_W)) u_hb2 (
    .clk, .rst, .en_in(en32), .en_out(en64), .x(hb1_y), .y);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) valid <= 1'b0;
    else     valid <= en64;
  end

endmodule
