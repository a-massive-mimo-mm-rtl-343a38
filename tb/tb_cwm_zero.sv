// tb_cwm_zero: self-checking test of the reference-element multiplier.
// Random I/Q bits are applied on a strobe every second cycle; two strobes
// later the outputs must be +6 for a 1 bit and -6 for a 0 bit.
module tb_cwm_zero;
  import bf_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en = 1'b0;
  logic i_bit = 1'b0, q_bit = 1'b0;
  cwm_t i_out, q_out;
  int exp_i [0:1023];
  int exp_q [0:1023];
  int checks = 0, failures = 0;

  cwm_zero dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int s = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      en = (t % 2) == 1;
      if (en) begin
        i_bit = 1'($urandom_range(0, 1));
        q_bit = 1'($urandom_range(0, 1));
        exp_i[s] = i_bit ? 6 : -6;
        exp_q[s] = q_bit ? 6 : -6;
      end
      @(posedge clk);
      #1;
      if (en) begin
        if (s >= 1) begin
          checks++;
          if (int'(i_out) != exp_i[s-1] || int'(q_out) != exp_q[s-1]) begin
            failures++;
            if (failures < 10) $display("strobe %0d: got %0d %0d", s, i_out, q_out);
          end
        end
        s++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
