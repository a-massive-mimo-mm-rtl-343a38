// bf_pkg: shared widths, types and filter coefficients of the bit-stream
// beamforming receiver.
//
// The receiver takes four 1-bit bandpass delta-sigma streams (IF = Fs/4),
// splits each into half-rate I/Q bits, mixes them to baseband with an XNOR,
// phase-shifts them with a mux-based complex weight multiplier (CWM), sums
// the four elements into a 6-bit word and decimates that word by 32 with a
// comb (sinc^4, /8) and two half-band (/2) filters.
//
// Widths follow the described implementation: 4-bit signed weights, 5-bit
// CWM outputs, 6-bit beamformer output, 18/28/38-bit filter outputs. The
// half-band coefficients are this design's own (the described filter uses
// externally supplied values that are not listed); the comb coefficients are
// the binomial expansion of (1 + z^-1 + ... + z^-7)^4, computed here.
// NUM_ELEM, W_WIDTH, REF_SCALE and BF_WIDTH are the defaults of the size
// parameters of the beamformer and the top (N_ELEM, W_W, SCALE, BF_W); the
// weight_t/cwm_t/bf_t types describe that default configuration.
package bf_pkg;

  localparam int unsigned NUM_ELEM   = 4;   // antenna elements
  localparam int unsigned W_WIDTH    = 4;   // sine/cosine weight width (signed)
  localparam int unsigned CWM_WIDTH  = W_WIDTH + 1;  // per-element CWM output
  localparam int unsigned BF_WIDTH   = 6;   // beamformer output = filter input (N)
  localparam int signed   REF_SCALE  = 6;   // weight of the unshifted element 0

  localparam int unsigned COMB_M     = 8;   // comb decimation ratio
  localparam int unsigned COMB_K     = 4;   // comb order (number of cascaded sums)
  localparam int unsigned COMB_TAPS  = COMB_K * (COMB_M - 1) + 1;  // 29
  localparam int unsigned COMB_GROWTH = 12; // log2(COMB_M^COMB_K)
  localparam int unsigned HB_GROWTH  = 10;  // coefficient scale 2^10, centre 512
  localparam int unsigned HB_ORDER   = 24;  // 25 positions, nonzero at odd offsets + centre
  localparam int unsigned HB_UNIQUE  = 6;   // distinct symmetric coefficients

  typedef logic signed [W_WIDTH-1:0]   weight_t;
  typedef logic signed [CWM_WIDTH-1:0] cwm_t;
  typedef logic signed [BF_WIDTH-1:0]  bf_t;

  // Symmetric half-band coefficients h[1], h[3], ..., h[11] (h[23-2k] = h[1+2k]),
  // scaled by 2^10. Together with the centre tap 512 they sum to 1024, so the
  // DC gain is exactly 2^HB_GROWTH. Equiripple design, passband 0..0.2 Fs,
  // stopband 0.3..0.5 Fs, about 40 dB attenuation.
  localparam int signed HB_COEF [HB_UNIQUE] = '{-7, 14, -27, 50, -99, 325};
  localparam int signed HB_CENTER = 512;

  // Coefficients of (sum_{i=0}^{COMB_M-1} z^-i)^COMB_K, computed by repeated
  // convolution with a length-COMB_M box: 1, 4, 10, 20, ..., 344, ..., 4, 1.
  typedef int comb_coef_t [COMB_TAPS];

  function automatic comb_coef_t comb_coefs();
    comb_coef_t a;
    comb_coef_t b;
    for (int n = 0; n < COMB_TAPS; n++) a[n] = (n == 0) ? 1 : 0;
    for (int s = 0; s < COMB_K; s++) begin
      for (int n = 0; n < COMB_TAPS; n++) begin
        b[n] = 0;
        for (int i = 0; i < COMB_M; i++)
          if (n - i >= 0) b[n] += a[n-i];
      end
      a = b;
    end
    return a;
  endfunction

  localparam comb_coef_t COMB_H = comb_coefs();

endpackage
