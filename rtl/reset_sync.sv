// Reset synchroniser: asserts asynchronously, releases on the second clock
// edge after the external reset goes low, so every flip-flop of a clock
// domain leaves reset on the same edge. One instance per clock domain.
module reset_sync (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);
  logic r1;

  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) begin
      r1      <= 1'b1;
      rst_out <= 1'b1;
    end else begin
      r1      <= 1'b0;
      rst_out <= r1;
    end
  end
endmodule
