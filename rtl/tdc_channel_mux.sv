// TDC channel multiplexer: connects the decoder of the selected channel
// (0..3 = A..D) to the function blocks. DR and RXNE of that channel go out;
// the function blocks' ACK is returned to that channel only, the other
// channels see ACK low. Purely combinational; sel only changes while no
// function block runs.
module tdc_channel_mux
  import tdc_pkg::*;
#(
  parameter int unsigned N_CH = 4
) (
  input  logic [$clog2(N_CH)-1:0] sel,
  input  sample_t                 dr_in   [N_CH],
  input  logic [N_CH-1:0]         rxne_in,
  input  logic                    ack_in,
  output sample_t                 dr,
  output logic                    rxne,
  output logic [N_CH-1:0]         ack_out
);
  always_comb begin
    dr           = dr_in[sel];
    rxne         = rxne_in[sel];
    ack_out      = '0;
    ack_out[sel] = ack_in;
  end
endmodule
