// tb_decimator: self-checking test of the three-stage decimation chain.
// 6-bit samples enter at the clock divider's half-rate strobe. The testbench
// models the chain in the sample domain with direct-form convolutions:
//   c[j]  = sum_k hc[k] x[8j+7-k]        (comb, at the CLK/16 strobes)
//   a[i]  = sum_k hh[k] c[2i-k]          (first half-band, CLK/32)
//   y[l]  = sum_k hh[k] a[2l-k]          (second half-band, CLK/64)
// (half-band results saturated to 28 and 38 bits)
// and checks every output on its valid pulse, one pulse per 64 clocks, the
// intermediate comb and half-band words, and the exact DC gain 2^32.
module tb_decimator;
  import bf_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic clk2, clk4, clk16, clk32, clk64, en2, en16, en32, en64;
  logic signed [5:0]  x = '0;
  logic signed [17:0] comb_y;
  logic signed [27:0] hb1_y;
  logic signed [37:0] y;
  logic valid;
  longint xs [0:16383];
  longint cs [0:2047];
  longint as [0:1023];
  int hc [29];
  int hh [25] = '{0, -7, 0, 14, 0, -27, 0, 50, 0, -99, 0, 325, 512,
                  325, 0, -99, 0, 50, 0, -27, 0, 14, 0, -7, 0};
  int checks = 0, failures = 0, n_valid = 0;

  clk_div u_div (.*);
  decimator dut (.clk, .rst, .en2, .en16, .en32, .en64, .x, .comb_y, .hb1_y, .y, .valid);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the half-band outputs saturate at their word width
  function automatic longint sat(input longint v, input int w);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    if (v > mx) return mx;
    if (v < -mx - 1) return -mx - 1;
    return v;
  endfunction

  initial begin
    automatic longint e;
    automatic int l, s;
    // sinc^4 coefficients by counting: number of ways to write n as a sum of
    // four integers in 0..7
    for (int n = 0; n < 29; n++) hc[n] = 0;
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++)
      for (int c = 0; c < 8; c++) for (int d = 0; d < 8; d++) hc[a+b+c+d]++;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 24000; t++) begin
      s = t / 2;
      if (t % 2 == 0) begin
        xs[s] = (s < 8000) ? longint'($urandom_range(0, 63)) - 32 : 31;
        x = 6'(xs[s]);
      end
      @(posedge clk);
      #1;
      if (t % 16 == 15) begin
        automatic int j = (t - 15) / 16;
        e = 0;
        for (int k = 0; k < 29; k++) if (8*j + 7 - k >= 0) e += hc[k] * xs[8*j + 7 - k];
        cs[j] = e;
        checks++; if (longint'(comb_y) != e) failures++;
      end
      if (t % 32 == 31) begin
        automatic int i = (t - 31) / 32;
        e = 0;
        for (int k = 0; k < 25; k++) if (2*i - k >= 0) e += hh[k] * cs[2*i - k];
        e = sat(e, 28);
        as[i] = e;
        checks++; if (longint'(hb1_y) != e) failures++;
      end
      if (valid) begin
        n_valid++;
        l = (t - 63) / 64;
        e = 0;
        for (int k = 0; k < 25; k++) if (2*l - k >= 0) e += hh[k] * as[2*l - k];
        e = sat(e, 38);
        checks++;
        if (t % 64 != 63 || longint'(y) != e) begin
          failures++;
          if (failures < 10) $display("t=%0d output %0d: got %0d expected %0d", t, l, y, e);
        end
        if (s > 9000) begin
          checks++;
          if (longint'(y) != 31 * (64'sd1 <<< 32)) failures++;
        end
      end
      @(negedge clk);
    end
    checks++; if (n_valid != 24000 / 64) begin failures++; $display("valid count %0d", n_valid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
