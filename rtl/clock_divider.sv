// Toggling counter clock divider. The counter runs on clk_in; when it
// reaches DIV it restarts from zero and the output is inverted, so
//   f_out = f_in / ((DIV + 1) * 2)
// with a 50 % duty cycle. This is the divider structure of the firmware's
// clock distributer (17-bit counter); reset holds the output low.
module clock_divider #(
  parameter int unsigned DIV   = 14,
  parameter int unsigned CNT_W = 17
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out
);
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk_in or posedge rst) begin
    if (rst) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else if (cnt == CNT_W'(DIV)) begin
      cnt     <= '0;
      clk_out <= ~clk_out;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
