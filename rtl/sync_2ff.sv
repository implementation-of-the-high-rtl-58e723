// Two flip-flop synchroniser for single-bit level signals crossing into the
// clock domain of clk. Each bit is synchronised on its own, so a bus must
// only carry independent levels (request/busy flags), never a data word.
// Output follows the input after two clock edges; reset clears it.
module sync_2ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
