// tb_cwm: self-checking test of the complex weight multiplier.
// Random +/-1 I/Q bits and random symmetric 4-bit weights are applied on a
// strobe every second cycle (with idle cycles between). The expected outputs
// I*cos + Q*sin and Q*cos - I*sin are computed in integers and must appear
// exactly two strobes after their inputs (the two pipeline registers), and
// the outputs must not move on cycles without a strobe.
module tb_cwm;
  import bf_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en = 1'b0;
  logic i_bit = 1'b0, q_bit = 1'b0;
  weight_t cos_w = '0, sin_w = '0;
  cwm_t i_out, q_out;
  int exp_i [0:1023];
  int exp_q [0:1023];
  int checks = 0, failures = 0;

  cwm dut (.*);

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
    automatic int c, sn, iv, qv;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 1600; t++) begin
      en = (t % 2) == 1;
      if (en) begin
        c  = $urandom_range(0, 14) - 7;
        sn = $urandom_range(0, 14) - 7;
        i_bit = 1'($urandom_range(0, 1));
        q_bit = 1'($urandom_range(0, 1));
        cos_w = weight_t'(c);
        sin_w = weight_t'(sn);
        iv = i_bit ? 1 : -1;
        qv = q_bit ? 1 : -1;
        exp_i[s] = iv * c + qv * sn;
        exp_q[s] = qv * c - iv * sn;
      end
      @(posedge clk);
      #1;
      if (en) begin
        if (s >= 1) begin
          // after strobe s the output holds the result of strobe s-1
          checks++;
          if (int'(i_out) != exp_i[s-1] || int'(q_out) != exp_q[s-1]) begin
            failures++;
            if (failures < 10)
              $display("strobe %0d: got %0d %0d expected %0d %0d", s, i_out, q_out, exp_i[s-1], exp_q[s-1]);
          end
        end
        s++;
      end else if (s >= 2) begin
        checks++;
        if (int'(i_out) != exp_i[s-2] || int'(q_out) != exp_q[s-2]) failures++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
