// Clock distributer of the FPGA firmware.
//
// The TMU result clock RCLK (300 MHz) clocks the serial decoders directly and
// feeds two counter dividers: one makes the 10 MHz clock of the supervisor
// and the function blocks (divide by 30, DIV_SYS = 14), the other the 16x
// oversampling clock of the RS-232 interface. The document asks for a
// division by 163 there; a toggling divider only divides by even numbers, so
// this design uses 162 (DIV_UART = 80), 1.852 MHz = 16 x 115.7 kbaud, within
// 0.5 % of 115200 baud. Both outputs start low after reset; periods are
// exactly 2*(DIV+1) input clocks.
module clock_distributer #(
  parameter int unsigned DIV_SYS  = 14,
  parameter int unsigned DIV_UART = 80
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_sys,
  output logic clk_uart
);
  clock_divider #(.DIV(DIV_SYS))  u_div_sys  (.clk_in, .rst, .clk_out(clk_sys));
  clock_divider #(.DIV(DIV_UART)) u_div_uart (.clk_in, .rst, .clk_out(clk_uart));
endmodule
