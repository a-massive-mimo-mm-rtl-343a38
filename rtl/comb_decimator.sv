// comb_decimator: polyphase comb (sinc^K) FIR filter decimating by M.
//
// Implements H(z) = (1 + z^-1 + ... + z^-(M-1))^K as a COMB_TAPS-tap FIR
// (29 taps for M = 8, K = 4) in polyphase form. A chain of M-1 registers at the
// input rate (strobe en_in) holds the most recent input samples; on each
// output strobe en_out the current sample and those M-1 registers are shifted
// into M branch delay lines running at the output rate, so all products and
// sums happen only once per output sample. Coefficients are symmetric
// (h[j] = h[TAPS-1-j]); the two samples sharing a coefficient are added before
// the constant multiplication. The DC gain is M^K = 2^12, so the output is
// 12 bits wider than the input and can never overflow.
//
// Timing: en_out must coincide with an en_in edge (it does with the clk_div
// strobes). On that edge the output register receives
//     y[m] = sum_j h[j] * x[n - j],  n = index of the input sample present.
// Reset: asynchronous, active high, clears all delay lines and the output.
module comb_decimator
  import bf_pkg::*;
#(
  parameter int unsigned IN_W  = BF_WIDTH,
  parameter int unsigned OUT_W = BF_WIDTH + COMB_GROWTH
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en_in,
  input  logic                    en_out,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);

  localparam int unsigned M    = COMB_M;
  localparam int unsigned TAPS = COMB_TAPS;
  localparam int unsigned DEPTH = (TAPS + M - 1) / M;   // taps per branch (4)

  typedef logic signed [IN_W-1:0]  samp_t;
  typedef logic signed [OUT_W-1:0] acc_t;

  samp_t dl  [1:M-1];              // input-rate delay chain x[n-1] .. x[n-M+1]
  samp_t br  [M][1:DEPTH-1];       // branch delay lines at the output rate
  samp_t tap [TAPS];               // x[n - j] for every tap j
  acc_t  acc;

  always_comb begin
    for (int j = 0; j < TAPS; j++) begin
      if (j == 0)      tap[j] = x;
      else if (j < M)  tap[j] = dl[j];
      else             tap[j] = br[j % M][j / M];
    end
    acc = '0;
    for (int j = 0; j < TAPS / 2; j++)
      acc += acc_t'(COMB_H[j]) * (acc_t'(tap[j]) + acc_t'(tap[TAPS-1-j]));
    if (TAPS % 2 == 1)
      acc += acc_t'(COMB_H[TAPS / 2]) * acc_t'(tap[TAPS / 2]);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 1; i < M; i++) dl[i] <= '0;
      for (int p = 0; p < M; p++)
        for (int d = 1; d < DEPTH; d++) br[p][d] <= '0;
      y <= '0;
    end else begin
      if (en_in) begin
        dl[1] <= x;
        for (int i = 2; i < M; i++) dl[i] <= dl[i-1];
      end
      if (en_out) begin
        for (int p = 0; p < M; p++) begin
          if (p == 0) br[p][1] <= x;
          else        br[p][1] <= dl[p];
          for (int d = 2; d < DEPTH; d++) br[p][d] <= br[p][d-1];
        end
        y <= acc;
      end
    end
  end

endmodule
