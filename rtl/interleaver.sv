// interleaver: splits one 1-bit delta-sigma stream into a half-rate
// in-phase bit and a half-rate quadrature bit.
//
// With the IF at a quarter of the sample rate, each sample is 90 degrees of
// IF phase after the one before it, so a stream delayed by one sample is the
// quadrature copy of the stream. The block keeps the previous input bit in a
// full-rate register; on each half-rate strobe `en2` it loads the current
// input into `i_bit` and the previous input into `q_bit`. Both outputs then
// hold for two main-clock cycles. The down-sampling by two and the one-sample
// delay follow the described block; the strobe (instead of a separate CLK/2
// clock) is this design's choice.
//
// Timing: outputs change on the main-clock edge where en2 is high.
// Reset: asynchronous, active high, clears all three registers.
module interleaver (
  input  logic clk,
  input  logic rst,
  input  logic en2,     // half-rate strobe from clk_div
  input  logic in_bit,  // delta-sigma bit: 1 = +1, 0 = -1
  output logic i_bit,
  output logic q_bit
);

  logic prev;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      prev  <= 1'b0;
      i_bit <= 1'b0;
      q_bit <= 1'b0;
    end else begin
      prev <= in_bit;
      if (en2) begin
        i_bit <= in_bit;
        q_bit <= prev;
      end
    end
  end

endmodule
