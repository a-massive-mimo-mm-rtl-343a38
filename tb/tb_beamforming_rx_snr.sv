// tb_beamforming_rx_snr: signal-to-noise measurement of the receiver at its
// default size.
//
// Four behavioural bandpass delta-sigma models digitize a tone at
// Fs/4 + Fs/1024 arriving from +20 deg. After the 64-clock output rate the
// tone sits at exactly 1/16 of the output rate, so 2048 output words hold a
// whole number of periods. The complex output z = i + j*q is projected on the
// tone (and on its mirror, the I/Q image); what is left over is counted as
// noise, over the whole 20 MHz output band. Two runs:
//   one element   only the reference element contributes (weights 1..3 = 0)
//   four elements the array is steered at the source
// Combining four elements with independent modulator noise should raise the
// SNR by about 6 dB (3 dB per doubling of the element count). The test checks
// that gain (between 3 and 9 dB), a minimum SNR for the four-element case,
// a small image, and the output rate. The absolute SNR depends on the
// modulator model, which is fourth order here rather than sixth.
// The source angle matters: from +30 deg the phase step between neighbours is
// pi/2, which at an IF of Fs/4 is exactly one clock, so every modulator sees a
// delayed copy of the same input and produces a delayed copy of the same
// noise; steering then adds the noise coherently and the gain shrinks. A third
// run shows this case; it is reported, not checked.
module tb_beamforming_rx_snr;
  import bf_pkg::*;

  localparam int  NOUT  = 2048;               // output words measured
  localparam int  NSKIP = 64;                 // output words left to settle
  localparam int  NCYC  = 64 * (NOUT + NSKIP + 1);
  localparam real PI    = 3.14159265358979;
  localparam real AMP   = 0.5;
  localparam real WB    = 2.0 * PI / 1024.0;  // baseband offset, rad/sample
  localparam real WO    = 2.0 * PI / 16.0;    // same offset per output word

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [NUM_ELEM-1:0] in_bits;
  weight_t cos_w [1][1:NUM_ELEM-1];
  weight_t sin_w [1][1:NUM_ELEM-1];
  logic signed [37:0] i_out [1];
  logic signed [37:0] q_out [1];
  logic out_valid;
  logic bf_ovf [1];
  real u [NUM_ELEM];

  int  checks = 0, failures = 0;
  real snr_db, img_db;

  for (genvar k = 0; k < NUM_ELEM; k++) begin : g_adc
    bp_dsm_model u_adc (.clk, .rst, .u(u[k]), .bit_out(in_bits[k]));
  end

  beamforming_rx dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One run with the given number of active elements, all steered at psi.
  // Leaves the SNR and the image level (both in dB) in snr_db and img_db.
  task automatic run(input int nelem, input real psi_deg);
    real zr [], zi [];
    real th, pr, pi_, mr, mi, er, ei, ptot, psig, pimg, pres;
    int  n, nv;
    zr = new[NOUT]; zi = new[NOUT];
    rst = 1'b1;
    for (int k = 0; k < NUM_ELEM; k++) u[k] = 0.0;
    for (int k = 1; k < NUM_ELEM; k++) begin
      th = k * PI * $sin(psi_deg * PI / 180.0);
      cos_w[0][k] = (k < nelem) ? weight_t'(int'($floor(6.0 * $cos(th) + 0.5))) : '0;
      sin_w[0][k] = (k < nelem) ? weight_t'(int'($floor(6.0 * $sin(th) + 0.5))) : '0;
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    n = 0; nv = 0;
    for (int t = 0; t < NCYC; t++) begin
      for (int k = 0; k < NUM_ELEM; k++)
        u[k] = AMP * $cos((PI / 2.0 + WB) * t + k * PI * $sin(psi_deg * PI / 180.0));
      @(posedge clk);
      #1;
      if (out_valid) begin
        nv++;
        if (nv > NSKIP && n < NOUT) begin
          zr[n] = real'(i_out[0]);
          zi[n] = real'(q_out[0]);
          n++;
        end
      end
      @(negedge clk);
    end
    checks++;
    if (nv != NCYC / 64) begin failures++; $display("valid count %0d", nv); end
    // projections on exp(+j WO l) and exp(-j WO l)
    pr = 0.0; pi_ = 0.0; mr = 0.0; mi = 0.0; ptot = 0.0;
    for (int l = 0; l < NOUT; l++) begin
      pr  += zr[l] * $cos(WO * l) + zi[l] * $sin(WO * l);
      pi_ += zi[l] * $cos(WO * l) - zr[l] * $sin(WO * l);
      mr  += zr[l] * $cos(WO * l) - zi[l] * $sin(WO * l);
      mi  += zi[l] * $cos(WO * l) + zr[l] * $sin(WO * l);
      ptot += zr[l] * zr[l] + zi[l] * zi[l];
    end
    pr /= NOUT; pi_ /= NOUT; mr /= NOUT; mi /= NOUT; ptot /= NOUT;
    psig = pr * pr + pi_ * pi_;
    pimg = mr * mr + mi * mi;
    // the rotation sense of the tone depends on the mixer convention
    if (pimg > psig) begin th = psig; psig = pimg; pimg = th; end
    pres = ptot - psig - pimg;
    snr_db = 10.0 * $log10(psig / pres);
    img_db = 10.0 * $log10(pimg / psig);
    $display("%0d element(s): signal amplitude %e, SNR %0.1f dB, image %0.1f dBc",
             nelem, $sqrt(psig), snr_db, img_db);
  endtask

  initial begin
    real snr1, snr4;
    for (int k = 1; k < NUM_ELEM; k++) begin cos_w[0][k] = '0; sin_w[0][k] = '0; end
    for (int k = 0; k < NUM_ELEM; k++) u[k] = 0.0;
    run(1, 20.0);
    snr1 = snr_db;
    run(NUM_ELEM, 20.0);
    snr4 = snr_db;
    $display("array gain in SNR: %0.1f dB", snr4 - snr1);
    checks++; if (snr4 - snr1 < 3.0 || snr4 - snr1 > 9.0) failures++;
    checks++; if (snr4 < 40.0) failures++;
    checks++; if (img_db > -30.0) failures++;
    run(NUM_ELEM, 30.0);
    $display("source at +30 deg (correlated modulator noise): gain %0.1f dB", snr_db - snr1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
