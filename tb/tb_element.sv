// tb_element: self-checking test of one steered element (interleaver, DDC,
// CWM) driven by the clock divider's strobes.
// The testbench keeps the input bits and weights of every cycle and predicts,
// for half-rate sample m (input bits of cycles 2m and 2m+1):
//   I = x[2m+1], Q = x[2m], LO = +1 for even m and -1 for odd m,
//   I' = LO*I*cos + LO*Q*sin, Q' = LO*Q*cos - LO*I*sin,
// using the weights present at cycle 2m+3, visible after edge 2m+5.
module tb_element;
  import bf_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic clk2, clk4, clk16, clk32, clk64, en2, en16, en32, en64;
  logic in_bit = 1'b0;
  weight_t cos_w = '0, sin_w = '0;
  cwm_t i_out, q_out;
  logic i_ddc, q_ddc;
  int x  [0:4095];
  int wc [0:4095];
  int ws [0:4095];
  int checks = 0, failures = 0;

  clk_div u_div (.*);
  element dut (.clk, .rst, .en2, .lo(clk4), .in_bit, .cos_w, .sin_w, .i_out, .q_out, .i_ddc, .q_ddc);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int m, iv, qv, lo, ei, eq;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 4000; t++) begin
      x[t] = $urandom_range(0, 1) ? 1 : -1;
      if (t % 50 == 0) begin
        cos_w = weight_t'($urandom_range(0, 14) - 7);
        sin_w = weight_t'($urandom_range(0, 14) - 7);
      end
      wc[t] = int'(cos_w);
      ws[t] = int'(sin_w);
      in_bit = x[t] > 0;
      @(posedge clk);
      #1;
      if (t % 2 == 1 && t >= 5) begin
        m  = (t - 5) / 2;
        lo = (m % 2 == 0) ? 1 : -1;
        iv = lo * x[2*m+1];
        qv = lo * x[2*m];
        ei = iv * wc[2*m+3] + qv * ws[2*m+3];
        eq = qv * wc[2*m+3] - iv * ws[2*m+3];
        checks++;
        if (int'(i_out) != ei || int'(q_out) != eq) begin
          failures++;
          if (failures < 10) $display("t=%0d: got %0d %0d expected %0d %0d", t, i_out, q_out, ei, eq);
        end
        // the baseband bits of sample m+2 are on the DDC outputs now
        checks++;
        if ((i_ddc ? 1 : -1) != lo * x[2*m+5] || (q_ddc ? 1 : -1) != lo * x[2*m+4]) failures++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
