// halfband_decimator: polyphase half-band FIR filter decimating by 2.
//
// The filter has order 24 (positions h[0..24]). In a half-band filter every
// second coefficient is zero except the centre: here h[12] = 0.5 and the
// nonzero outer taps sit at the odd positions 1, 3, ..., 23, symmetric about
// the centre (h[j] = h[24-j]). Coefficients are integers scaled by 2^10
// (bf_pkg::HB_COEF, centre 512), so the output is 10 bits wider than the input.
//
// Polyphase form: one register at the input rate keeps the previous input
// sample. On each output strobe en_out the current sample (even phase) and the
// previous one (odd phase) enter two delay lines that run at the output rate:
// the odd phase feeds the 12 symmetric taps (pre-added in pairs, then six
// constant multiplications), the even phase only needs a 6-sample delay to
// reach the centre tap, which is a shift. On that edge the output register gets
//     y[m] = sum_j h[j] * x[n - j],  n = index of the input sample present.
// The worst-case gain (sum of |h|) exceeds 2^10, so an adversarial input could
// exceed OUT_W bits; the result then saturates (this design's choice).
// Reset: asynchronous, active high.
module halfband_decimator
  import bf_pkg::*;
#(
  parameter int unsigned IN_W  = BF_WIDTH + COMB_GROWTH,
  parameter int unsigned OUT_W = IN_W + HB_GROWTH
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en_in,
  input  logic                    en_out,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);

  localparam int unsigned NODD  = 2 * HB_UNIQUE;      // 12 odd-phase taps
  localparam int unsigned CDLY  = HB_ORDER / 4;       // centre delay (6) at output rate
  localparam int unsigned ACC_W = IN_W + HB_GROWTH + 2;

  typedef logic signed [IN_W-1:0]  samp_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic signed [OUT_W-1:0] out_t;

  localparam acc_t OUT_MAX = acc_t'({1'b0, {(OUT_W-1){1'b1}}});
  localparam acc_t OUT_MIN = -OUT_MAX - acc_t'(1);

  samp_t prev;                 // input-rate register
  samp_t od [1:NODD-1];        // odd phase, delayed by 1..11 output samples
  samp_t ev [1:CDLY];          // even phase, delayed by 1..6 output samples
  samp_t otap [NODD];          // x[n-1-2k], k = 0..11
  acc_t  acc;

  always_comb begin
    otap[0] = prev;
    for (int k = 1; k < NODD; k++) otap[k] = od[k];
    acc = acc_t'(HB_CENTER) * acc_t'(ev[CDLY]);
    for (int k = 0; k < HB_UNIQUE; k++)
      acc += acc_t'(HB_COEF[k]) * (acc_t'(otap[k]) + acc_t'(otap[NODD-1-k]));
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      prev <= '0;
      for (int k = 1; k < NODD; k++) od[k] <= '0;
      for (int k = 1; k <= CDLY; k++) ev[k] <= '0;
      y <= '0;
    end else begin
      if (en_in) prev <= x;
      if (en_out) begin
        od[1] <= prev;
        for (int k = 2; k < NODD; k++) od[k] <= od[k-1];
        ev[1] <= x;
        for (int k = 2; k <= CDLY; k++) ev[k] <= ev[k-1];
        if (acc > OUT_MAX)      y <= out_t'(OUT_MAX);
        else if (acc < OUT_MIN) y <= out_t'(OUT_MIN);
        else                    y <= out_t'(acc);
      end
    end
  end

endmodule
