// clk_div: core clock divider.
//
// The board oscillator runs at 40 MHz; the FPGA logic of this design runs on a
// 5 MHz clock taken from the most significant bit of a free-running 3-bit
// counter, as the document does. With DIV_LOG2 = 3 the output is a square wave
// of period 8 input clocks and 50 % duty cycle; it is low while reset is held
// and its first rising edge comes 4 input clocks after reset is released.
// Reset is asynchronous and active high (this design's choice of reset style).
module clk_div #(
  parameter int unsigned DIV_LOG2 = 3        // divide by 2**DIV_LOG2
) (
  input  logic clk_in,                       // 40 MHz board clock
  input  logic reset,                        // asynchronous, active high
  output logic clk_out                       // divided clock
);
  logic [DIV_LOG2-1:0] cnt;

  always_ff @(posedge clk_in or posedge reset)
    if (reset) cnt <= '0;
    else       cnt <= cnt + 1'b1;

  assign clk_out = cnt[DIV_LOG2-1];
endmodule
