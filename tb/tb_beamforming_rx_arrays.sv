// tb_beamforming_rx_arrays: the receiver built for other rows of the scale
// study than the default (4 elements, 4-bit weights, scale 6, 6-bit sum):
//   8 elements,  4-bit weights, scale 6,  7-bit filter input
//   16 elements, 4-bit weights, scale 6,  8-bit filter input
//   4 elements,  5-bit weights, scale 12, 7-bit filter input
//
// Each size is driven and checked by an rx_array_check instance (bit-exact
// output words, steered amplitude, null at the mirror angle, overflow with
// forbidden weights); they run one after the other on a shared clock.
module tb_beamforming_rx_arrays;

  logic clk = 1'b0;
  logic start8 = 1'b0;
  logic done8, done16, done5;
  int   c8, f8, c16, f16, c5, f5;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  rx_array_check #(.NE(8),  .BW(7)) u_a8  (.clk, .start(start8), .done(done8),  .checks(c8),  .failures(f8));
  rx_array_check #(.NE(16), .BW(8)) u_a16 (.clk, .start(done8),   .done(done16), .checks(c16), .failures(f16));
  rx_array_check #(.NE(4), .BW(7), .WW(5), .SC(12))
                                    u_w5  (.clk, .start(done16),  .done(done5),  .checks(c5),  .failures(f5));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c8 + c16 + c5, failures + f8 + f16 + f5);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    start8 = 1'b1;
    wait (done5);
    checks   = c8 + c16 + c5;
    failures = f8 + f16 + f5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
