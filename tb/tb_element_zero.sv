// tb_element_zero: self-checking test of the reference element driven by the
// clock divider's strobes. For half-rate sample m the expected outputs are
// 6*LO*x[2m+1] and 6*LO*x[2m] (LO = +1 for even m), visible after edge 2m+5.
module tb_element_zero;
  import bf_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic clk2, clk4, clk16, clk32, clk64, en2, en16, en32, en64;
  logic in_bit = 1'b0;
  cwm_t i_out, q_out;
  logic i_ddc, q_ddc;
  int x [0:4095];
  int checks = 0, failures = 0;

  clk_div u_div (.*);
  element_zero dut (.clk, .rst, .en2, .lo(clk4), .in_bit, .i_out, .q_out, .i_ddc, .q_ddc);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int m, lo;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      x[t] = $urandom_range(0, 1) ? 1 : -1;
      in_bit = x[t] > 0;
      @(posedge clk);
      #1;
      if (t % 2 == 1 && t >= 5) begin
        m  = (t - 5) / 2;
        lo = (m % 2 == 0) ? 1 : -1;
        checks++;
        if (int'(i_out) != 6 * lo * x[2*m+1] || int'(q_out) != 6 * lo * x[2*m]) begin
          failures++;
          if (failures < 10) $display("t=%0d: got %0d %0d", t, i_out, q_out);
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
