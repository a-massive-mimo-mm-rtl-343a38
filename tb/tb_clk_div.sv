// tb_clk_div: self-checking test of the clock divider.
// After reset, a cycle counter kept by the testbench predicts every divided
// clock (bit k of the cycle count toggles with period 2^(k+1)) and every
// strobe (high in the last cycle of its divided period). The number of
// strobes seen over 1024 cycles is also checked against 1024 / ratio.
module tb_clk_div;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic clk2, clk4, clk16, clk32, clk64, en2, en16, en32, en64;
  int checks = 0, failures = 0;
  int n2 = 0, n16 = 0, n32 = 0, n64 = 0;

  clk_div dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input logic got, input logic exp, input string what, input int t);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("cycle %0d %s: got %0b expected %0b", t, what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 1024; t++) begin
      // during cycle t (before edge t) the divided clocks show (t / ratio/2) mod 2
      expect_bit(clk2,  1'((t / 1)  % 2), "clk2",  t);
      expect_bit(clk4,  1'((t / 2)  % 2), "clk4",  t);
      expect_bit(clk16, 1'((t / 8)  % 2), "clk16", t);
      expect_bit(clk32, 1'((t / 16) % 2), "clk32", t);
      expect_bit(clk64, 1'((t / 32) % 2), "clk64", t);
      expect_bit(en2,  (t % 2)  == 1,  "en2",  t);
      expect_bit(en16, (t % 16) == 15, "en16", t);
      expect_bit(en32, (t % 32) == 31, "en32", t);
      expect_bit(en64, (t % 64) == 63, "en64", t);
      n2 += int'(en2); n16 += int'(en16); n32 += int'(en32); n64 += int'(en64);
      @(negedge clk);
    end
    checks++; if (n2  != 512) failures++;
    checks++; if (n16 != 64)  failures++;
    checks++; if (n32 != 32)  failures++;
    checks++; if (n64 != 16)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
