// tb_beamformer: self-checking test of the four-element beamformer, built
// with two beams so that the shared front end and the extra multipliers of
// the second beam are covered. Random input bits and random weights per beam
// (changed every 40 cycles) drive the beamformer through the clock divider's
// strobes. For half-rate sample m the
// testbench forms each element's rotated I'/Q' from the input bits (element 0
// with weight 6/0), sums them, and expects the sum wrapped to 6 bits after
// edge 2m+9 (interleaver, two CWM stages, two adder stages), with the
// overflow flag set exactly when the sum is outside -32..31. Both wrapped and
// in-range sums must occur.
module tb_beamformer;
  import bf_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic clk2, clk4, clk16, clk32, clk64, en2, en16, en32, en64;
  logic [NUM_ELEM-1:0] in_bits = '0;
  localparam int NB = 2;
  weight_t cos_w [NB][1:NUM_ELEM-1];
  weight_t sin_w [NB][1:NUM_ELEM-1];
  bf_t i_bf [NB];
  bf_t q_bf [NB];
  logic ovf [NB];
  int x  [NUM_ELEM][0:8191];
  int wc [NB][NUM_ELEM][0:8191];
  int ws [NB][NUM_ELEM][0:8191];
  int checks = 0, failures = 0, n_ovf = 0, n_ok = 0;

  clk_div u_div (.*);
  beamformer #(.NUM_BEAMS(NB)) dut (.clk, .rst, .en2, .lo(clk4), .in_bits, .cos_w, .sin_w, .i_bf, .q_bf, .ovf);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap6(input int v);
    int r;
    r = ((v % 64) + 64) % 64;
    return (r >= 32) ? r - 64 : r;
  endfunction

  initial begin
    automatic int m, lo, iv, qv, si, sq, c, s;
    automatic bit e_ovf;
    for (int b = 0; b < NB; b++)
      for (int k = 1; k < NUM_ELEM; k++) begin cos_w[b][k] = '0; sin_w[b][k] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 8000; t++) begin
      if (t % 40 == 0)
        for (int b = 0; b < NB; b++)
          for (int k = 1; k < NUM_ELEM; k++) begin
            cos_w[b][k] = weight_t'($urandom_range(0, 14) - 7);
            sin_w[b][k] = weight_t'($urandom_range(0, 14) - 7);
          end
      for (int k = 0; k < NUM_ELEM; k++) begin
        x[k][t] = $urandom_range(0, 1) ? 1 : -1;
        in_bits[k] = x[k][t] > 0;
        for (int b = 0; b < NB; b++) begin
          wc[b][k][t] = (k == 0) ? 6 : int'(cos_w[b][k]);
          ws[b][k][t] = (k == 0) ? 0 : int'(sin_w[b][k]);
        end
      end
      @(posedge clk);
      #1;
      if (t % 2 == 1 && t >= 9) begin
        m  = (t - 9) / 2;
        lo = (m % 2 == 0) ? 1 : -1;
        for (int b = 0; b < NB; b++) begin
          si = 0; sq = 0;
          for (int k = 0; k < NUM_ELEM; k++) begin
            iv = lo * x[k][2*m+1];
            qv = lo * x[k][2*m];
            c  = wc[b][k][2*m+3];
            s  = ws[b][k][2*m+3];
            si += iv * c + qv * s;
            sq += qv * c - iv * s;
          end
          e_ovf = (si > 31 || si < -32 || sq > 31 || sq < -32);
          if (e_ovf) n_ovf++; else n_ok++;
          checks++;
          if (int'(i_bf[b]) != wrap6(si) || int'(q_bf[b]) != wrap6(sq) || ovf[b] != e_ovf) begin
            failures++;
            if (failures < 10)
              $display("t=%0d beam %0d: got %0d %0d %0b expected %0d %0d %0b", t, b, i_bf[b], q_bf[b], ovf[b], wrap6(si), wrap6(sq), e_ovf);
          end
        end
      end
      @(negedge clk);
    end
    checks++; if (n_ovf == 0) begin failures++; $display("no overflow exercised"); end
    checks++; if (n_ok == 0)  begin failures++; $display("no in-range sum exercised"); end
    $display("overflow samples %0d, in-range samples %0d", n_ovf, n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
