// tb_beamforming_rx_2beam: the receiver built with two simultaneous beams.
//
// Two sources reach the four-element array at the same time: source A from
// +30 deg (baseband offset Fs/1024) and source B from -20 deg (offset
// 3*Fs/1024), each at half the single-source amplitude. Beam 0 is steered to
// -20 deg and beam 1 to +30 deg; both share the interleavers and
// down-converters. Every output word of both beams is compared bit-exactly
// with a sample-domain model of the chain built from the recorded ADC bits.
// Each beam must then carry its own source clearly above the other one:
// the power of the matching tone (measured by correlation over the last 90
// outputs) must be at least 5 times that of the other tone.
module tb_beamforming_rx_2beam;
  import bf_pkg::*;

  localparam int  NB    = 2;
  localparam int  NCYC  = 9600;
  localparam real PI    = 3.14159265358979;
  localparam real AMP   = 0.25;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [NUM_ELEM-1:0] in_bits;
  weight_t cos_w [NB][1:NUM_ELEM-1];
  weight_t sin_w [NB][1:NUM_ELEM-1];
  logic signed [37:0] i_out [NB];
  logic signed [37:0] q_out [NB];
  logic out_valid;
  logic bf_ovf [NB];
  real u [NUM_ELEM];

  int checks = 0, failures = 0, n_valid = 0, n_sep = 0;
  int     xb [NUM_ELEM][0:NCYC+63];
  int     wc [NB][NUM_ELEM];
  int     ws [NB][NUM_ELEM];
  longint cs [NB][2][0:NCYC/16+1];
  longint as [NB][2][0:NCYC/32+1];
  // correlation of each beam's output with tone A and tone B, both rotation senses
  real cr [NB][2][2], ci [NB][2][2];

  for (genvar k = 0; k < NUM_ELEM; k++) begin : g_adc
    bp_dsm_model u_adc (.clk, .rst, .u(u[k]), .bit_out(in_bits[k]));
  end

  beamforming_rx #(.NUM_BEAMS(NB)) dut (.*);

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

  function automatic int bf_ref(input int b, input int m, input bit q);
    int lo, iv, qv, s;
    if (m < -1) return 0;
    lo = (((m % 2) + 2) % 2 == 0) ? 1 : -1;
    s = 0;
    for (int k = 0; k < NUM_ELEM; k++) begin
      iv = lo * ((m < 0) ? -1 : xb[k][2*m+1]);
      qv = lo * ((m < 0) ? -1 : xb[k][2*m]);
      s += q ? (qv * wc[b][k] - iv * ws[b][k]) : (iv * wc[b][k] + qv * ws[b][k]);
    end
    return wrap6(s);
  endfunction

  function automatic longint comb_ref(input int b, input int j, input bit q);
    int hc [29];
    longint e = 0;
    for (int n = 0; n < 29; n++) hc[n] = 0;
    for (int a = 0; a < 8; a++) for (int bb = 0; bb < 8; bb++)
      for (int c = 0; c < 8; c++) for (int d = 0; d < 8; d++) hc[a+bb+c+d]++;
    for (int k = 0; k < 29; k++) e += hc[k] * bf_ref(b, 8*j + 2 - k, q);
    return e;
  endfunction

  function automatic longint hb_ref(input longint v [0:NCYC/16+1], input int i);
    int hh [25] = '{0, -7, 0, 14, 0, -27, 0, 50, 0, -99, 0, 325, 512,
                    325, 0, -99, 0, 50, 0, -27, 0, 14, 0, -7, 0};
    longint e = 0;
    for (int k = 0; k < 25; k++) if (2*i - k >= 0) e += hh[k] * v[2*i - k];
    return e;
  endfunction

  function automatic longint hb2_ref(input longint v [0:NCYC/32+1], input int i);
    int hh [25] = '{0, -7, 0, 14, 0, -27, 0, 50, 0, -99, 0, 325, 512,
                    325, 0, -99, 0, 50, 0, -27, 0, 14, 0, -7, 0};
    longint e = 0;
    for (int k = 0; k < 25; k++) if (2*i - k >= 0) e += hh[k] * v[2*i - k];
    return e;
  endfunction

  initial begin
    real psi_src [2] = '{30.0, -20.0};       // source A, source B
    real wb_src  [2] = '{2.0 * PI / 1024.0, 6.0 * PI / 1024.0};
    real psi_beam [NB] = '{-20.0, 30.0};      // beam 0 -> B, beam 1 -> A
    real th, ph, own, other, pw [2];
    longint ei, eq;
    int l;

    for (int b = 0; b < NB; b++) begin
      wc[b][0] = REF_SCALE; ws[b][0] = 0;
      for (int k = 1; k < NUM_ELEM; k++) begin
        th = k * PI * $sin(psi_beam[b] * PI / 180.0);
        wc[b][k] = int'($floor(6.0 * $cos(th) + 0.5));
        ws[b][k] = int'($floor(6.0 * $sin(th) + 0.5));
        cos_w[b][k] = weight_t'(wc[b][k]);
        sin_w[b][k] = weight_t'(ws[b][k]);
      end
      for (int s = 0; s < 2; s++) for (int d = 0; d < 2; d++) begin cr[b][s][d] = 0.0; ci[b][s][d] = 0.0; end
    end
    for (int k = 0; k < NUM_ELEM; k++) u[k] = 0.0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < NCYC; t++) begin
      for (int k = 0; k < NUM_ELEM; k++) begin
        xb[k][t] = in_bits[k] ? 1 : -1;
        u[k] = 0.0;
        for (int s = 0; s < 2; s++)
          u[k] += AMP * $cos((PI / 2.0 + wb_src[s]) * t + k * PI * $sin(psi_src[s] * PI / 180.0));
      end
      @(posedge clk);
      #1;
      for (int b = 0; b < NB; b++) begin
        if (t % 16 == 15) begin
          cs[b][0][(t-15)/16] = comb_ref(b, (t-15)/16, 1'b0);
          cs[b][1][(t-15)/16] = comb_ref(b, (t-15)/16, 1'b1);
        end
        if (t % 32 == 31) begin
          as[b][0][(t-31)/32] = sat(hb_ref(cs[b][0], (t-31)/32), 28);
          as[b][1][(t-31)/32] = sat(hb_ref(cs[b][1], (t-31)/32), 28);
        end
      end
      if (out_valid) begin
        n_valid++;
        l = (t - 63) / 64;
        for (int b = 0; b < NB; b++) begin
          ei = sat(hb2_ref(as[b][0], l), 38);
          eq = sat(hb2_ref(as[b][1], l), 38);
          checks++;
          if (t % 64 != 63 || longint'(i_out[b]) != ei || longint'(q_out[b]) != eq) begin
            failures++;
            if (failures < 10) $display("t=%0d beam %0d out %0d: got %0d %0d expected %0d %0d",
                                        t, b, l, i_out[b], q_out[b], ei, eq);
          end
          if (l >= 60)
            for (int s = 0; s < 2; s++)
              for (int d = 0; d < 2; d++) begin
                ph = (d ? 1.0 : -1.0) * 64.0 * wb_src[s] * l;
                cr[b][s][d] += real'(i_out[b]) * $cos(ph) - real'(q_out[b]) * $sin(ph);
                ci[b][s][d] += real'(i_out[b]) * $sin(ph) + real'(q_out[b]) * $cos(ph);
              end
        end
      end
      @(negedge clk);
    end

    for (int b = 0; b < NB; b++) begin
      for (int s = 0; s < 2; s++) begin
        pw[s] = 0.0;
        for (int d = 0; d < 2; d++)
          if (cr[b][s][d] ** 2 + ci[b][s][d] ** 2 > pw[s]) pw[s] = cr[b][s][d] ** 2 + ci[b][s][d] ** 2;
      end
      own   = (b == 0) ? pw[1] : pw[0];
      other = (b == 0) ? pw[0] : pw[1];
      $display("beam %0d: own source %e, other source %e, ratio %f dB", b, own, other, 10.0 * $log10(own / other));
      checks++;
      if (own > 5.0 * other) n_sep++;
      else failures++;
    end
    checks++; if (n_valid != NCYC / 64) failures++;
    $display("mechanisms: outputs=%0d separated_beams=%0d", n_valid, n_sep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
