// tb_comb_decimator: self-checking test of the polyphase comb decimator.
// Random 6-bit samples enter at the half-rate strobe of the clock divider and
// the filter decimates by 8 at the CLK/16 strobe. The expected output is the
// direct-form convolution with the sinc^4 coefficients, which the testbench
// computes from the closed form
//   h[n] = sum_i (-1)^i C(4,i) C(n - 8i + 3, 3),
// i.e. independently of the recursive computation used in the RTL.
// The output rate (one update per 16 clocks) and the exact full-scale DC gain
// 2^12 are checked as well.
module tb_comb_decimator;
  import bf_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic clk2, clk4, clk16, clk32, clk64, en2, en16, en32, en64;
  logic signed [5:0]  x = '0;
  logic signed [17:0] y;
  int xs [0:8191];
  int h [29];
  int checks = 0, failures = 0, n_out = 0;

  clk_div u_div (.*);
  comb_decimator dut (.clk, .rst, .en_in(en2), .en_out(en16), .x, .y);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int binom(input int n, input int k);
    int r = 1;
    if (n < k || n < 0) return 0;
    for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return r;
  endfunction

  initial begin
    automatic int j, s, e, hsum = 0;
    for (int n = 0; n < 29; n++) begin
      h[n] = 0;
      for (int i = 0; i <= 4; i++)
        h[n] += ((i % 2) ? -1 : 1) * binom(4, i) * binom(n - 8 * i + 3, 3);
      hsum += h[n];
    end
    checks++; if (hsum != 4096 || h[14] != 344) failures++;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 12000; t++) begin
      s = t / 2;
      if (t % 2 == 0) begin
        // random samples first, then a full-scale constant for the DC check
        xs[s] = (s < 5000) ? $urandom_range(0, 63) - 32 : -32;
        x = 6'(xs[s]);
      end
      @(posedge clk);
      #1;
      if (t % 16 == 15) begin
        n_out++;
        j = (t - 15) / 16;
        e = 0;
        for (int k = 0; k < 29; k++)
          if (8 * j + 7 - k >= 0) e += h[k] * xs[8 * j + 7 - k];
        checks++;
        if (int'(y) != e) begin
          failures++;
          if (failures < 10) $display("output %0d: got %0d expected %0d", j, y, e);
        end
        if (s > 5040) begin
          checks++;
          if (int'(y) != -32 * 4096) failures++;
        end
      end
      @(negedge clk);
    end
    checks++; if (n_out != 12000 / 16) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
