// Asynchronous data reading function block.
//
// Streams samples of the selected channel to the PC as they come, for as
// long as the serial line can keep up. After start it takes every sample
// the decoder posts (RXNE/ACK four-phase handshake). If the serial port is
// free, the sample is sent as a 5-byte word; if it is still sending the
// previous one, the new sample is acknowledged and thrown away, as the
// document describes. The block ends, dropping busy, when param samples
// have been sent (discarded samples do not count, a choice of this design).
//
// Start/Busy with the supervisor: busy rises the clock after start, falls
// after the last transfer once start is low. Serial port: tx.start is held
// until tx_busy is seen high, then dropped; the next word is sent after
// tx_busy has fallen. tx_busy and rxne arrive synchronised to clk.
module async_read_fb
  import tdc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  input  logic [PARAM_W-1:0] param,
  input  sample_t           dr,
  input  logic              rxne,
  output logic              ack,
  output tx_req_t           tx,
  input  logic              tx_busy,
  output logic              discarded   // one-clock pulse per dropped sample
);
  typedef enum logic [1:0] {T_IDLE, T_REQ, T_WAIT} tx_state_e;

  tx_state_e          tx_state;
  logic [PARAM_W-1:0] target, sent;
  logic               running;
  logic               take;

  assign take = running && rxne && !ack && (sent != target);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy      <= 1'b0;
      running   <= 1'b0;
      target    <= '0;
      sent      <= '0;
      ack       <= 1'b0;
      tx        <= '0;
      tx_state  <= T_IDLE;
      discarded <= 1'b0;
    end else begin
      discarded <= 1'b0;
      // start / finish
      if (!busy && start) begin
        busy    <= 1'b1;
        running <= 1'b1;
        target  <= param;
        sent    <= '0;
      end else if (running && sent == target && tx_state == T_IDLE && !tx_busy && !ack) begin
        running <= 1'b0;
      end else if (busy && !running && !start) begin
        busy <= 1'b0;
      end

      // sample handshake with the decoder
      if (take) begin
        ack <= 1'b1;
        if (tx_state == T_IDLE && !tx_busy) begin
          tx.data  <= dr;
          tx.num   <= 3'd5;
          tx.start <= 1'b1;
          tx_state <= T_REQ;
          sent     <= sent + 1'b1;
        end else begin
          discarded <= 1'b1;
        end
      end else if (ack && !rxne) begin
        ack <= 1'b0;
      end

      // serial port handshake
      unique case (tx_state)
        T_REQ:  if (tx_busy)  begin tx.start <= 1'b0; tx_state <= T_WAIT; end
        T_WAIT: if (!tx_busy) tx_state <= T_IDLE;
        default: ;
      endcase
    end
  end
endmodule
