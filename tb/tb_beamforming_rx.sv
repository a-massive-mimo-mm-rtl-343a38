// tb_beamforming_rx: end-to-end test of the four-element receiver at its
// default (and only) size.
//
// Four behavioural bandpass delta-sigma models digitize the same IF tone
// (Fs/4 + Fs/1024) as seen by a half-wavelength linear array from incidence
// angle psi_in: element k leads element 0 by k*pi*sin(psi_in). The receiver
// weights are those of a steering angle psi: cos_w[k] = round(6 cos(k pi sin psi)),
// sin_w[k] = round(6 sin(k pi sin psi)).
//
// Every decimated output is compared bit-exactly with a sample-domain model
// built from the recorded ADC bits: interleave, XNOR mixing, complex weights,
// 6-bit wrapped sum, then sinc^4 (/8) and two half-bands (/2) as direct-form
// convolutions. Beyond that the test measures what the receiver is for:
//   steer   psi = psi_in = 30 deg: coherent sum, output amplitude ~ 4*6*A*2^32
//   null    psi = -30 deg for the same signal: the four paths cancel
//   multi-angle sweep of the steering angle: the response peaks at psi_in
//   forbidden weights (7, 7): the 6-bit beamformer sum overflows (bf_ovf)
//   reset between runs clears the outputs
// Each mechanism is counted and a failure is counted for one that never
// happened. The output rate (one valid per 64 clocks) is checked too.
module tb_beamforming_rx;
  import bf_pkg::*;

  localparam int    NCYC  = 9600;             // cycles per run (150 outputs)
  localparam real   PI    = 3.14159265358979;
  localparam real   AMP   = 0.5;
  localparam real   WB    = 2.0 * PI / 1024.0; // baseband offset, rad/sample

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

  int checks = 0, failures = 0;
  int n_valid = 0, n_ovf = 0, n_steer = 0, n_null = 0, n_reset = 0, n_sweep = 0;

  // recorded stimulus and reference pipeline of the current run
  int     xb [NUM_ELEM][0:NCYC+63];
  int     wc [NUM_ELEM];
  int     ws [NUM_ELEM];
  longint cs [0:NCYC/16+1];
  longint as [0:NCYC/32+1];
  real    pwr;

  for (genvar k = 0; k < NUM_ELEM; k++) begin : g_adc
    bp_dsm_model u_adc (.clk, .rst, .u(u[k]), .bit_out(in_bits[k]));
  end

  beamforming_rx dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(input longint v, input int w);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    if (v > mx) return mx;
    if (v < -mx - 1) return -mx - 1;
    return v;
  endfunction

  function automatic int wrap6(input int v);
    int r = ((v % 64) + 64) % 64;
    return (r >= 32) ? r - 64 : r;
  endfunction

  // beamformer output for half-rate sample m (I when q == 0, Q when q == 1)
  function automatic int bf_ref(input int m, input bit q);
    int lo, iv, qv, s;
    if (m < -1) return 0;
    lo = (((m % 2) + 2) % 2 == 0) ? 1 : -1;
    s = 0;
    for (int k = 0; k < NUM_ELEM; k++) begin
      iv = lo * ((m < 0) ? -1 : xb[k][2*m+1]);
      qv = lo * ((m < 0) ? -1 : xb[k][2*m]);
      s += q ? (qv * wc[k] - iv * ws[k]) : (iv * wc[k] + qv * ws[k]);
    end
    return wrap6(s);
  endfunction

  function automatic longint comb_ref(input int j, input bit q);
    int hc [29];
    longint e = 0;
    for (int n = 0; n < 29; n++) hc[n] = 0;
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++)
      for (int c = 0; c < 8; c++) for (int d = 0; d < 8; d++) hc[a+b+c+d]++;
    for (int k = 0; k < 29; k++) e += hc[k] * bf_ref(8*j + 2 - k, q);
    return e;
  endfunction

  function automatic longint hb_ref(input longint v [], input int i);
    int hh [25] = '{0, -7, 0, 14, 0, -27, 0, 50, 0, -99, 0, 325, 512,
                    325, 0, -99, 0, 50, 0, -27, 0, 14, 0, -7, 0};
    longint e = 0;
    for (int k = 0; k < 25; k++) if (2*i - k >= 0) e += hh[k] * v[2*i - k];
    return e;
  endfunction

  // One run: reset, apply weights for steering angle psi_deg (or raw weights
  // when raw is set), feed a tone from psi_in_deg, check every output.
  // Returns the mean output power over the last 90 outputs in pwr.
  task automatic run(input real psi_in_deg, input real psi_deg, input bit raw,
                     input int raw_c, input int raw_s);
    longint ci [], cq [], ai [], aq [];
    longint ei, eq;
    real th, phi, acc;
    int l, nacc;
    ci = new[NCYC/16+2]; cq = new[NCYC/16+2];
    ai = new[NCYC/32+2]; aq = new[NCYC/32+2];
    rst = 1'b1;
    for (int k = 0; k < NUM_ELEM; k++) u[k] = 0.0;
    wc[0] = REF_SCALE; ws[0] = 0;
    for (int k = 1; k < NUM_ELEM; k++) begin
      th = k * PI * $sin(psi_deg * PI / 180.0);
      wc[k] = raw ? raw_c : int'($floor(6.0 * $cos(th) + 0.5));
      ws[k] = raw ? raw_s : int'($floor(6.0 * $sin(th) + 0.5));
      cos_w[0][k] = weight_t'(wc[k]);
      sin_w[0][k] = weight_t'(ws[k]);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (i_out[0] != 0 || q_out[0] != 0 || out_valid) failures++;
    else n_reset++;
    rst = 1'b0;
    acc = 0.0; nacc = 0;
    for (int t = 0; t < NCYC; t++) begin
      // cycle t: the sample the receiver takes at edge t is on in_bits now
      for (int k = 0; k < NUM_ELEM; k++) begin
        xb[k][t] = in_bits[k] ? 1 : -1;
        phi = k * PI * $sin(psi_in_deg * PI / 180.0);
        u[k] = AMP * $cos((PI / 2.0 + WB) * t + phi);
      end
      @(posedge clk);
      #1;
      if (bf_ovf[0]) n_ovf++;
      if (t % 16 == 15) begin
        ci[(t-15)/16] = comb_ref((t-15)/16, 1'b0);
        cq[(t-15)/16] = comb_ref((t-15)/16, 1'b1);
      end
      if (t % 32 == 31) begin
        ai[(t-31)/32] = sat(hb_ref(ci, (t-31)/32), 28);
        aq[(t-31)/32] = sat(hb_ref(cq, (t-31)/32), 28);
      end
      if (out_valid) begin
        n_valid++;
        l  = (t - 63) / 64;
        ei = sat(hb_ref(ai, l), 38);
        eq = sat(hb_ref(aq, l), 38);
        checks++;
        if (t % 64 != 63 || longint'(i_out[0]) != ei || longint'(q_out[0]) != eq) begin
          failures++;
          if (failures < 10) $display("t=%0d out %0d: got %0d %0d expected %0d %0d", t, l, i_out[0], q_out[0], ei, eq);
        end
        if (l >= 60) begin
          acc += real'(i_out[0]) * real'(i_out[0]) + real'(q_out[0]) * real'(q_out[0]);
          nacc++;
        end
      end
      @(negedge clk);
    end
    pwr = acc / nacc;
  endtask

  initial begin
    real p_match, p_null, p_best, best_psi, amp, amp_exp;
    for (int k = 1; k < NUM_ELEM; k++) begin cos_w[0][k] = '0; sin_w[0][k] = '0; end
    for (int k = 0; k < NUM_ELEM; k++) u[k] = 0.0;

    // steered at the source
    run(30.0, 30.0, 1'b0, 0, 0);
    p_match = pwr;
    amp = $sqrt(p_match);
    amp_exp = AMP * 4.0 * 6.0 * 4294967296.0;
    $display("steered: rms amplitude %e (ideal %e)", amp, amp_exp);
    checks++;
    if (amp > 0.8 * amp_exp && amp < 1.2 * amp_exp) n_steer++;
    else failures++;

    // steered to the mirror angle: the array nulls the source
    run(30.0, -30.0, 1'b0, 0, 0);
    p_null = pwr;
    $display("null: power ratio %f dB", 10.0 * $log10(p_match / p_null));
    checks++;
    if (p_match > 100.0 * p_null) n_null++;
    else failures++;

    // coarse steering sweep: the strongest response is at the source angle
    p_best = 0.0; best_psi = -90.0;
    for (int a = -60; a <= 60; a += 30) begin
      run(30.0, real'(a), 1'b0, 0, 0);
      n_sweep++;
      $display("sweep psi=%0d: power %e", a, pwr);
      if (pwr > p_best) begin p_best = pwr; best_psi = real'(a); end
    end
    checks++;
    if (best_psi != 30.0) begin failures++; $display("sweep peak at %f", best_psi); end

    // weights outside the usable circle: the 6-bit sum must overflow
    run(0.0, 0.0, 1'b1, 7, 7);

    checks++; if (n_valid != 8 * (NCYC / 64)) begin failures++; $display("valid count %0d", n_valid); end
    checks++; if (n_ovf == 0)   begin failures++; $display("overflow never happened"); end
    checks++; if (n_reset == 0) failures++;
    checks++; if (n_steer == 0) failures++;
    checks++; if (n_null == 0)  failures++;
    checks++; if (n_sweep == 0) failures++;
    $display("mechanisms: outputs=%0d overflow_samples=%0d resets=%0d steer=%0d null=%0d sweep_runs=%0d",
             n_valid, n_ovf, n_reset, n_steer, n_null, n_sweep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
