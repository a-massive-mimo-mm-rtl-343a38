// clk_div: divides the main clock by 2, 4, 16, 32 and 64.
//
// A 6-bit counter advances on every main clock edge; its bits are the divided
// clocks (bit 0 = CLK/2, bit 1 = CLK/4, bit 3 = CLK/16, bit 4 = CLK/32,
// bit 5 = CLK/64), each a 50 % duty-cycle square wave in phase with the
// others. The described divider is an asynchronous ripple chain whose stages
// clock each other; here the same waveforms come from one synchronous counter,
// and every stage of the receiver stays on the main clock and uses the
// one-cycle strobes en2/en16/en32/en64 instead of the divided clocks. A strobe
// is high in the last main-clock cycle of each divided period, i.e. on the
// main-clock edge where the divided clock would rise next. The divided clock
// outputs are kept for the DDC local oscillator (CLK/4) and for observation.
//
// Reset: asynchronous, active high, clears the counter.
module clk_div (
  input  logic clk,
  input  logic rst,
  output logic clk2,
  output logic clk4,
  output logic clk16,
  output logic clk32,
  output logic clk64,
  output logic en2,
  output logic en16,
  output logic en32,
  output logic en64
);

  logic [5:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 6'd1;
  end

  assign clk2  = cnt[0];
  assign clk4  = cnt[1];
  assign clk16 = cnt[3];
  assign clk32 = cnt[4];
  assign clk64 = cnt[5];

  assign en2  = cnt[0];
  assign en16 = &cnt[3:0];
  assign en32 = &cnt[4:0];
  assign en64 = &cnt[5:0];

endmodule
