// tb_ddc: self-checking test of the XNOR down-converter.
// All eight input combinations are applied; the expected output is the
// product of the local-oscillator value and the data value in +/-1 terms
// (bit 1 = +1, bit 0 = -1), mapped back to a bit.
module tb_ddc;
  logic lo, i_bit, q_bit, i_ddc, q_ddc;
  int checks = 0, failures = 0;

  ddc dut (.*);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pm(input logic b);
    return b ? 1 : -1;
  endfunction

  initial begin
    for (int v = 0; v < 8; v++) begin
      {lo, i_bit, q_bit} = 3'(v);
      #1;
      checks++;
      if (pm(i_ddc) != pm(lo) * pm(i_bit)) failures++;
      checks++;
      if (pm(q_ddc) != pm(lo) * pm(q_bit)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
