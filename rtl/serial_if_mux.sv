// Serial interface multiplexer: gives the transmit request port of the
// RS-232 interface to one owner (0 supervisor, 1 asynchronous read,
// 2 histogram, 3 synchronous read) and returns TX Busy to that owner only;
// the others see the port busy-free and their requests are ignored.
// Combinational; the owner only changes while the port is idle.
module serial_if_mux
  import tdc_pkg::*;
(
  input  owner_e  sel,
  input  tx_req_t src_tx   [4],
  output tx_req_t tx,
  input  logic    tx_busy,
  output logic [3:0] src_busy
);
  always_comb begin
    tx            = src_tx[sel];
    src_busy      = '0;
    src_busy[sel] = tx_busy;
  end
endmodule
