// Two-channel de-multiplexer that sets the direction of the peltier
// current: the PWM input goes to dout[0] (H-bridge IN1) when sel is 0 and
// to dout[1] (IN2) when sel is 1; the unselected output stays low, so the
// bridge alternates between drive and free-wheeling low. Truth table as in
// the document; which output feeds which bridge input is this design's
// choice. Combinational.
module direction_demux (
  input  logic       sel,
  input  logic       din,
  output logic [1:0] dout
);
  always_comb begin
    dout       = '0;
    dout[sel]  = din;
  end
endmodule
