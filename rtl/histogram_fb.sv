// Histogram generation function block.
//
// Builds the distribution of time stamps in a RAM of 2^ADDR_W bins of
// CNT_W-bit counts (Virtex-5 block RAM, 64 K x 16 by default): the low
// ADDR_W bits of each sample address a bin, whose count is read in one
// state and written back plus one in the next (counts saturate at the top,
// a choice of this design). After param samples it sends the one-byte
// finished message HIST_DONE and drops busy. A later start_upload request
// sends every bin, address 0 first, as two bytes, low byte first.
//
// Reset, and also every new generation, first clears the RAM, one bin per
// clock (2^ADDR_W clocks), during which busy is high. The document gives
// the RAM organisation, the two-state update and the reset clear; the
// message byte, the upload format and the clear at start are this
// design's. Handshakes are those of the other function blocks: start/busy
// four-phase with the supervisor, tx.start held until tx_busy is seen,
// rxne/ack four-phase with the decoder; rxne and tx_busy come in
// synchronised to clk.
module histogram_fb
  import tdc_pkg::*;
#(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned CNT_W  = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic               start_upload,
  output logic               busy,
  input  logic [PARAM_W-1:0] param,
  input  sample_t            dr,
  input  logic               rxne,
  output logic               ack,
  output tx_req_t            tx,
  input  logic               tx_busy
);
  typedef enum logic [3:0] {
    H_CLEAR, H_IDLE, H_WAIT, H_READ, H_WRITE,
    H_MSG, H_UP_READ, H_UP_SEND, H_TX_REQ, H_TX_WAIT, H_END
  } state_e;

  state_e             state, after_tx;
  logic [CNT_W-1:0]   mem [2**ADDR_W];
  logic [ADDR_W-1:0]  addr;
  logic [CNT_W-1:0]   rd_q;
  logic               we;
  logic [CNT_W-1:0]   wdata;
  logic [PARAM_W-1:0] target, count;
  logic               up_last;

  // Block RAM: one write port, registered read
  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rd_q <= mem[addr];
  end

  always_comb begin
    we    = 1'b0;
    wdata = '0;
    if (state == H_CLEAR) begin
      we = 1'b1;
    end else if (state == H_WRITE) begin
      we    = 1'b1;
      wdata = (rd_q == '1) ? rd_q : rd_q + 1'b1;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= H_CLEAR;
      after_tx <= H_IDLE;
      addr     <= '0;
      target   <= '0;
      count    <= '0;
      busy     <= 1'b1;
      ack      <= 1'b0;
      tx       <= '0;
      up_last  <= 1'b0;
    end else begin
      if (ack && !rxne) ack <= 1'b0;
      unique case (state)
        H_CLEAR: begin
          addr <= addr + 1'b1;
          if (addr == '1) state <= (target == '0) ? H_END : H_WAIT;
        end
        H_IDLE: begin
          if (start) begin
            busy   <= 1'b1;
            target <= param;
            count  <= '0;
            addr   <= '0;
            state  <= (param == '0) ? H_END : H_CLEAR;
          end else if (start_upload) begin
            busy    <= 1'b1;
            addr    <= '0;
            up_last <= 1'b0;
            state   <= H_UP_READ;
          end
        end
        H_WAIT: if (rxne && !ack) begin
          ack   <= 1'b1;
          addr  <= dr[ADDR_W-1:0];
          state <= H_READ;
        end
        H_READ:  state <= H_WRITE;              // RAM read of the bin
        H_WRITE: begin                          // write back count + 1
          count <= count + 1'b1;
          state <= (count + 1'b1 == target) ? H_MSG : H_WAIT;
        end
        H_MSG: begin
          tx.data  <= {HIST_DONE, {(SAMPLE_W-8){1'b0}}};
          tx.num   <= 3'd1;
          tx.start <= 1'b1;
          after_tx <= H_END;
          state    <= H_TX_REQ;
        end
        H_UP_READ: state <= H_UP_SEND;          // RAM read of the bin
        H_UP_SEND: begin
          tx.data  <= SAMPLE_W'(rd_q) << (SAMPLE_W - 16);
          tx.num   <= 3'd2;
          tx.start <= 1'b1;
          up_last  <= (addr == '1);
          after_tx <= H_UP_READ;
          state    <= H_TX_REQ;
        end
        H_TX_REQ: if (tx_busy) begin
          tx.start <= 1'b0;
          state    <= H_TX_WAIT;
        end
        H_TX_WAIT: if (!tx_busy) begin
          if (after_tx == H_UP_READ) begin
            addr  <= addr + 1'b1;
            state <= up_last ? H_END : H_UP_READ;
          end else begin
            state <= after_tx;
          end
        end
        H_END: if (!start && !start_upload) begin
          target <= '0;
          busy   <= 1'b0;
          state  <= H_IDLE;
        end
        default: state <= H_IDLE;
      endcase
    end
  end
endmodule
