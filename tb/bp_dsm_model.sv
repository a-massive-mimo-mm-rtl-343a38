// bp_dsm_model: behavioural (not synthesizable) model of a 1-bit bandpass
// delta-sigma ADC with its noise-shaping notch at a quarter of the sample
// rate. It stands in for the continuous-time bandpass modulator that feeds
// each antenna element of the receiver and is used only by testbenches.
//
// Discrete-time error-feedback structure: on every clock edge
//     v = u + 2*e[n-2] + e[n-4],   bit = (v >= 0),   e[n] = (bit ? 1 : -1) - v,
// so the output is u + (1 + z^-2)^2 * e: a fourth-order noise transfer
// function with a double zero at +/- Fs/4 (the real modulator is sixth order).
// Stable for |u| up to about 0.6. Input u is a real sample in -1..1; output
// bit 1 means +1 and 0 means -1.
module bp_dsm_model (
  input  logic clk,
  input  logic rst,
  input  real  u,
  output logic bit_out
);

  real e1, e2, e3, e4;   // e[n-1] .. e[n-4]

  always @(posedge clk or posedge rst) begin
    real v, yq;
    if (rst) begin
      e1 = 0.0; e2 = 0.0; e3 = 0.0; e4 = 0.0;
      bit_out <= 1'b0;
    end else begin
      v  = u + 2.0 * e2 + e4;
      yq = (v >= 0.0) ? 1.0 : -1.0;
      e4 = e3; e3 = e2; e2 = e1;
      e1 = yq - v;
      bit_out <= (v >= 0.0);
    end
  end

endmodule
