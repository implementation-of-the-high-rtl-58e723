// RS-232 serial interface of the FPGA firmware.
//
// Moves words of up to five bytes between the firmware and the PC with a
// single request. Transmit: when tx_start is seen, the 40-bit tx_data and
// the byte count tx_num are latched and bytes 5-tx_num .. 4 of the word are
// sent, lowest first (a 2-byte transfer sends bytes 3 and 4, so short data
// goes in the upper bytes). Receive works the same way: rx_num bytes are
// collected from the line into bytes 5-rx_num .. 4 of rx_data, the rest of
// rx_data being cleared. This byte placement and the five-step sequence
// follow the document; the UART itself (8N1, 16x oversampling, 16-byte
// receive FIFO so no byte is lost between two requests) is this design's.
//
// Start/Busy handshake (four-phase, requester in another clock domain):
// start is synchronised here; busy rises on the second clk edge after start
// is seen; the requester then drops start and keeps tx_data/tx_num stable
// until then. Busy falls when the last byte is done and start is low, and
// rx_data is stable from then until the next receive request. All logic runs
// on the 16x baud clock.
module rs232_serial_interface
  import tdc_pkg::*;
#(
  parameter int unsigned N_BYTES       = 5,
  parameter int unsigned RX_FIFO_DEPTH = 16
) (
  input  logic            clk,
  input  logic            rst,
  // transmit request
  input  logic            tx_start,
  input  logic [2:0]      tx_num,
  input  sample_t         tx_data,
  output logic            tx_busy,
  // receive request
  input  logic            rx_start,
  input  logic [2:0]      rx_num,
  output sample_t         rx_data,
  output logic            rx_busy,
  // serial line
  output logic            txd,
  input  logic            rxd
);
  typedef enum logic [1:0] {X_IDLE, X_BYTE, X_WAIT, X_DONE} xfer_e;

  logic tx_start_s, rx_start_s;
  sync_2ff #(.W(2)) u_start_sync (.clk, .rst, .d({tx_start, rx_start}), .q({tx_start_s, rx_start_s}));

  // ---------------- transmit sequencer ----------------
  xfer_e      tx_state;
  sample_t    tx_word;
  logic [2:0] tx_idx;
  logic       utx_send, utx_busy;

  uart_tx u_uart_tx (.clk, .rst, .send(utx_send), .data(tx_word[tx_idx*8 +: 8]), .busy(utx_busy), .txd);

  assign utx_send = (tx_state == X_BYTE) && !utx_busy;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      tx_state <= X_IDLE;
      tx_word  <= '0;
      tx_idx   <= '0;
      tx_busy  <= 1'b0;
    end else begin
      unique case (tx_state)
        X_IDLE: if (tx_start_s) begin
          tx_word  <= tx_data;
          tx_busy  <= 1'b1;
          if (tx_num == 3'd0 || tx_num > 3'(N_BYTES)) begin
            tx_state <= X_DONE;
          end else begin
            tx_idx   <= 3'(N_BYTES) - tx_num;
            tx_state <= X_BYTE;
          end
        end
        X_BYTE: if (!utx_busy) tx_state <= X_WAIT;     // byte handed over
        X_WAIT: if (!utx_busy) begin                    // byte on the line done
          if (tx_idx == 3'(N_BYTES - 1)) tx_state <= X_DONE;
          else begin
            tx_idx   <= tx_idx + 1'b1;
            tx_state <= X_BYTE;
          end
        end
        X_DONE: if (!tx_start_s) begin
          tx_busy  <= 1'b0;
          tx_state <= X_IDLE;
        end
        default: tx_state <= X_IDLE;
      endcase
    end
  end

  // ---------------- receive sequencer ----------------
  xfer_e      rx_state;
  logic [2:0] rx_idx;
  logic [7:0] urx_data, fifo_dout;
  logic       urx_valid, fifo_empty, fifo_full, fifo_pop;

  uart_rx u_uart_rx (.clk, .rst, .rxd, .data(urx_data), .valid(urx_valid));

  byte_fifo #(.DEPTH(RX_FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst, .push(urx_valid), .din(urx_data), .pop(fifo_pop),
    .dout(fifo_dout), .empty(fifo_empty), .full(fifo_full)
  );

  assign fifo_pop = (rx_state == X_BYTE) && !fifo_empty;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rx_state <= X_IDLE;
      rx_data  <= '0;
      rx_idx   <= '0;
      rx_busy  <= 1'b0;
    end else begin
      unique case (rx_state)
        X_IDLE: if (rx_start_s) begin
          rx_data <= '0;
          rx_busy <= 1'b1;
          if (rx_num == 3'd0 || rx_num > 3'(N_BYTES)) begin
            rx_state <= X_DONE;
          end else begin
            rx_idx   <= 3'(N_BYTES) - rx_num;
            rx_state <= X_BYTE;
          end
        end
        X_BYTE: if (!fifo_empty) begin
          rx_data[rx_idx*8 +: 8] <= fifo_dout;
          if (rx_idx == 3'(N_BYTES - 1)) rx_state <= X_DONE;
          else rx_idx <= rx_idx + 1'b1;
        end
        X_DONE: if (!rx_start_s) begin
          rx_busy  <= 1'b0;
          rx_state <= X_IDLE;
        end
        default: rx_state <= X_IDLE;
      endcase
    end
  end
endmodule
