// PWM generator driving the peltier H-bridge. A counter clocked by the
// 24 MHz MCU clock counts 0 .. PERIOD-1, so with PERIOD = 255 the output
// repeats every 255 clocks (94.1 kHz), as in the document. The output is
// high while the counter is below compare: compare 0 is always off, 255
// always on, in 255 steps (the compare mode is this design's choice).
// compare is sampled at the start of each period so a period is never cut.
module pwm_generator #(
  parameter int unsigned W      = 8,
  parameter int unsigned PERIOD = 255
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] compare,
  output logic         pwm
);
  logic [W-1:0] cnt, cmp_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt   <= '0;
      cmp_q <= '0;
      pwm   <= 1'b0;
    end else begin
      if (cnt == W'(PERIOD - 1)) begin
        cnt   <= '0;
        cmp_q <= compare;
        pwm   <= (compare != '0);
      end else begin
        cnt <= cnt + 1'b1;
        pwm <= (cnt + 1'b1) < cmp_q;
      end
    end
  end
endmodule
