// Timer that paces the temperature control loop. The 24 MHz MCU clock is
// divided by PRESCALE (24) to a 1 MHz count enable; an up counter restarts
// every PERIOD (20000) counts, i.e. every 20 ms (50 Hz), and sets the
// terminal-count flag tc. The flag stays set until the firmware clears it
// with tc_clear after it has seen it; a clear in the same clock as a new
// terminal count leaves the flag set. Counter values follow the document,
// the sticky flag and its clear input are this design's.
module loop_timer #(
  parameter int unsigned PRESCALE = 24,
  parameter int unsigned PERIOD   = 20000
) (
  input  logic clk,
  input  logic rst,
  input  logic tc_clear,
  output logic tc
);
  localparam int unsigned PW = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;
  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [PW-1:0] pre;
  logic [CW-1:0] cnt;
  logic          tick, wrap;

  assign tick = (pre == PW'(PRESCALE - 1));
  assign wrap = tick && (cnt == CW'(PERIOD - 1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pre <= '0;
      cnt <= '0;
      tc  <= 1'b0;
    end else begin
      pre <= tick ? '0 : pre + 1'b1;
      if (tick) cnt <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      if (wrap)          tc <= 1'b1;
      else if (tc_clear) tc <= 1'b0;
    end
  end
endmodule
