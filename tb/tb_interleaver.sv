// tb_interleaver: self-checking test of the interleaver.
// Drives random bits at full rate with a half-rate strobe on every second
// cycle. After each strobe edge the in-phase output must equal the bit that
// was present at that edge and the quadrature output the bit one cycle
// earlier; between strobes both outputs must hold.
module tb_interleaver;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en2 = 1'b0;
  logic in_bit = 1'b0;
  logic i_bit, q_bit;
  logic hist [0:2047];
  int checks = 0, failures = 0;

  interleaver dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      hist[t] = 1'($urandom_range(0, 1));
      in_bit  = hist[t];
      en2     = (t % 2) == 1;
      @(posedge clk);
      #1;
      if (t >= 1) begin
        // last strobe edge at or before t
        automatic int s = (t % 2 == 1) ? t : t - 1;
        checks++;
        if (i_bit !== hist[s] || q_bit !== hist[s-1]) begin
          failures++;
          if (failures < 10)
            $display("t=%0d I=%0b Q=%0b expected %0b %0b", t, i_bit, q_bit, hist[s], hist[s-1]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
