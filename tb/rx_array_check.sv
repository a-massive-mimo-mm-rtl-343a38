// rx_array_check: testbench helper that drives and checks one receiver
// (beamforming_rx) built for a given array size and filter-input width.
//
// It owns NE behavioural bandpass delta-sigma models fed with a tone at
// Fs/4 + Fs/1024 arriving at a half-wavelength linear array (from +30 deg unless noted), and
// a receiver with N_ELEM = NE, BF_W = BW, W_W = WW and SCALE = SC. When
// `start` rises it runs three cases, each after a reset:
//   steer   beam at +30 deg: amplitude ~ NE*SC*A*2^32
//   null    beam at -30 deg: the elements cancel (more than 20 dB down)
//   forbidden weights (largest code for cos and sin) on every element, source at broadside: the
//            BW-bit sum overflows
// Every output word is compared bit-exactly with a sample-domain model of the
// chain (interleave, XNOR mixing, weights, BW-bit wrap, comb, two half-bands).
// The beamformer's adder tree has log2(NE) register levels, so its output
// for half-rate sample m appears 2*(log2(NE) - 2) clocks later than in the
// four-element receiver; the model accounts for it. `checks`/`failures`
// accumulate; `done` rises at the end.
module rx_array_check
  import bf_pkg::*;
#(
  parameter int unsigned NE = 8,
  parameter int unsigned BW = 7,
  parameter int unsigned WW = W_WIDTH,
  parameter int          SC = REF_SCALE
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int  NCYC  = 9600;
  localparam int  OW    = BW + COMB_GROWTH + 2 * HB_GROWTH;
  localparam int  LV    = $clog2(NE);
  localparam int  WMAX  = (1 << (WW - 1)) - 1;   // largest weight code
  localparam real PI    = 3.14159265358979;
  localparam real AMP   = 0.5;
  localparam real WB    = 2.0 * PI / 1024.0;

  logic rst = 1'b1;
  logic [NE-1:0] in_bits;
  logic signed [WW-1:0] cos_w [1][1:NE-1];
  logic signed [WW-1:0] sin_w [1][1:NE-1];
  logic signed [OW-1:0] i_out [1];
  logic signed [OW-1:0] q_out [1];
  logic out_valid;
  logic bf_ovf [1];
  real u [NE];

  int  xb [NE][0:NCYC+63];
  int  wc [NE];
  int  ws [NE];
  int  n_ovf;
  real pwr;

  for (genvar k = 0; k < NE; k++) begin : g_adc
    bp_dsm_model u_adc (.clk, .rst, .u(u[k]), .bit_out(in_bits[k]));
  end

  beamforming_rx #(.N_ELEM(NE), .W_W(WW), .SCALE(SC), .BF_W(BW)) dut (.*);

  function automatic longint sat(input longint v, input int w);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    if (v > mx) return mx;
    if (v < -mx - 1) return -mx - 1;
    return v;
  endfunction

  function automatic int wrapn(input int v);
    int m = 1 << BW;
    int r = ((v % m) + m) % m;
    return (r >= m / 2) ? r - m : r;
  endfunction

  function automatic int bf_ref(input int m, input bit q);
    int lo, iv, qv, s;
    if (m < -1) return 0;
    lo = (((m % 2) + 2) % 2 == 0) ? 1 : -1;
    s = 0;
    for (int k = 0; k < NE; k++) begin
      iv = lo * ((m < 0) ? -1 : xb[k][2*m+1]);
      qv = lo * ((m < 0) ? -1 : xb[k][2*m]);
      s += q ? (qv * wc[k] - iv * ws[k]) : (iv * wc[k] + qv * ws[k]);
    end
    return wrapn(s);
  endfunction

  function automatic longint comb_ref(input int j, input bit q);
    int hc [29];
    longint e = 0;
    for (int n = 0; n < 29; n++) hc[n] = 0;
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++)
      for (int c = 0; c < 8; c++) for (int d = 0; d < 8; d++) hc[a+b+c+d]++;
    for (int k = 0; k < 29; k++) e += hc[k] * bf_ref(8*j + 4 - LV - k, q);
    return e;
  endfunction

  function automatic longint hb_ref(input longint v [], input int i);
    int hh [25] = '{0, -7, 0, 14, 0, -27, 0, 50, 0, -99, 0, 325, 512,
                    325, 0, -99, 0, 50, 0, -27, 0, 14, 0, -7, 0};
    longint e = 0;
    for (int k = 0; k < 25; k++) if (2*i - k >= 0) e += hh[k] * v[2*i - k];
    return e;
  endfunction

  task automatic run(input real psi_in_deg, input real psi_deg, input bit raw);
    longint ci [], cq [], ai [], aq [];
    longint ei, eq;
    real th, acc;
    int l, nacc;
    ci = new[NCYC/16+2]; cq = new[NCYC/16+2];
    ai = new[NCYC/32+2]; aq = new[NCYC/32+2];
    rst = 1'b1;
    for (int k = 0; k < NE; k++) u[k] = 0.0;
    wc[0] = SC; ws[0] = 0;
    for (int k = 1; k < NE; k++) begin
      th = k * PI * $sin(psi_deg * PI / 180.0);
      wc[k] = raw ? WMAX : int'($floor(SC * $cos(th) + 0.5));
      ws[k] = raw ? WMAX : int'($floor(SC * $sin(th) + 0.5));
      cos_w[0][k] = WW'(wc[k]);
      sin_w[0][k] = WW'(ws[k]);
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    acc = 0.0; nacc = 0;
    for (int t = 0; t < NCYC; t++) begin
      for (int k = 0; k < NE; k++) begin
        xb[k][t] = in_bits[k] ? 1 : -1;
        u[k] = AMP * $cos((PI / 2.0 + WB) * t + k * PI * $sin(psi_in_deg * PI / 180.0));
      end
      @(posedge clk);
      #1;
      if (bf_ovf[0]) n_ovf++;
      if (t % 16 == 15) begin
        ci[(t-15)/16] = comb_ref((t-15)/16, 1'b0);
        cq[(t-15)/16] = comb_ref((t-15)/16, 1'b1);
      end
      if (t % 32 == 31) begin
        ai[(t-31)/32] = sat(hb_ref(ci, (t-31)/32), BW + COMB_GROWTH + HB_GROWTH);
        aq[(t-31)/32] = sat(hb_ref(cq, (t-31)/32), BW + COMB_GROWTH + HB_GROWTH);
      end
      if (out_valid) begin
        l  = (t - 63) / 64;
        ei = sat(hb_ref(ai, l), OW);
        eq = sat(hb_ref(aq, l), OW);
        checks++;
        if (t % 64 != 63 || longint'(i_out[0]) != ei || longint'(q_out[0]) != eq) begin
          failures++;
          if (failures < 10)
            $display("%0d elements t=%0d out %0d: got %0d %0d expected %0d %0d",
                     NE, t, l, i_out[0], q_out[0], ei, eq);
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
    real p_steer, amp_exp;
    done = 1'b0; checks = 0; failures = 0; n_ovf = 0;
    for (int k = 1; k < NE; k++) begin cos_w[0][k] = '0; sin_w[0][k] = '0; end
    for (int k = 0; k < NE; k++) u[k] = 0.0;
    wait (start);
    run(30.0, 30.0, 1'b0);
    p_steer = pwr;
    amp_exp = AMP * NE * SC * 4294967296.0;
    $display("%0d elements, %0d-bit weights, scale %0d, %0d-bit sum: steered amplitude %e (ideal %e), overflow samples %0d",
             NE, WW, SC, BW, $sqrt(p_steer), amp_exp, n_ovf);
    checks++;
    if ($sqrt(p_steer) < 0.8 * amp_exp || $sqrt(p_steer) > 1.2 * amp_exp) failures++;
    checks++;
    if (n_ovf != 0) failures++;     // a steerable angle must not overflow
    run(30.0, -30.0, 1'b0);
    $display("%0d elements: null %0.1f dB below the steered beam", NE, 10.0 * $log10(p_steer / pwr));
    checks++;
    if (p_steer < 100.0 * pwr) failures++;
    run(0.0, 0.0, 1'b1);
    $display("%0d elements: overflow samples with forbidden weights %0d", NE, n_ovf);
    checks++;
    if (n_ovf == 0) failures++;
    done = 1'b1;
  end

endmodule
