// tb_halfband_decimator: self-checking test of the polyphase half-band
// decimator at its default 18-bit input.
// The input changes every clock (en_in always high) and an output is taken
// every second clock. The expected output is the direct-form convolution with
// the full 25-position impulse response (listed here position by position,
// zeros included), saturated to 28 bits. Three phases: random full-scale
// samples, a constant (DC gain must be exactly 1024), and a worst-case
// pattern that matches the coefficient signs and must saturate.
module tb_halfband_decimator;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en_in = 1'b1;
  logic en_out = 1'b0;
  logic signed [17:0] x = '0;
  logic signed [27:0] y;
  longint xs [0:8191];
  int h [25] = '{0, -7, 0, 14, 0, -27, 0, 50, 0, -99, 0, 325, 512,
                 325, 0, -99, 0, 50, 0, -27, 0, 14, 0, -7, 0};
  int checks = 0, failures = 0, n_sat = 0;

  halfband_decimator dut (.clk, .rst, .en_in, .en_out, .x, .y);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic longint e;
    automatic int i;
    localparam longint MAXV = (64'sd1 <<< 27) - 1;
    localparam longint MINV = -(64'sd1 <<< 27);
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 6000; t++) begin
      if (t < 2000)      xs[t] = longint'($urandom_range(0, 262143)) - 131072;
      else if (t < 3000) xs[t] = 100000;
      else               xs[t] = (h[(2 * ((t + 1) / 2) - t + 24) % 25] >= 0) ? 131071 : -131072;
      x = 18'(xs[t]);
      en_out = (t % 2) == 1;
      @(posedge clk);
      #1;
      if (t % 2 == 1) begin
        e = 0;
        for (int k = 0; k < 25; k++)
          if (t - k >= 0) e += longint'(h[k]) * xs[t - k];
        if (e > MAXV) begin e = MAXV; n_sat++; end
        if (e < MINV) begin e = MINV; n_sat++; end
        checks++;
        if (longint'(y) != e) begin
          failures++;
          if (failures < 10) $display("t=%0d: got %0d expected %0d", t, y, e);
        end
        if (t > 2030 && t < 3000) begin
          checks++;
          if (longint'(y) != 100000 * 1024) failures++;
        end
      end
      @(negedge clk);
    end
    checks++; if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("saturated outputs %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
