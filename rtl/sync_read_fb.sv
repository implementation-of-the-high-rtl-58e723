// Synchronous data reading function block.
//
// Records param consecutive samples of the selected channel at the full
// rate of the decoder into a DEPTH-deep FIFO (65536 x 40 bits by default),
// without waiting for the slow serial line, and then uploads all of them,
// oldest first, as 5-byte words. The FIFO is a single-port RAM written in
// order during capture and read in order during upload, which is all a
// FIFO that is never read and written at the same time needs. param must
// be 1..DEPTH (the supervisor rejects other values).
//
// Handshakes as in the other function blocks: start/busy four-phase with
// the supervisor, rxne/ack four-phase with the decoder (a sample is stored
// in the clock it is acknowledged), tx.start held until tx_busy is seen;
// rxne and tx_busy arrive synchronised to clk.
module sync_read_fb
  import tdc_pkg::*;
#(
  parameter int unsigned DEPTH  = 65536,
  parameter int unsigned DATA_W = 40
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  output logic               busy,
  input  logic [PARAM_W-1:0] param,
  input  sample_t            dr,
  input  logic               rxne,
  output logic               ack,
  output tx_req_t            tx,
  input  logic               tx_busy
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [2:0] {S_IDLE, S_CAPTURE, S_READ, S_SEND, S_TX_REQ, S_TX_WAIT, S_END} state_e;

  state_e             state;
  logic [DATA_W-1:0]  mem [DEPTH];
  logic [DATA_W-1:0]  rd_q;
  logic [AW-1:0]      addr;
  logic               we;
  logic [PARAM_W-1:0] target, count;

  assign we = (state == S_CAPTURE) && rxne && !ack;

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= dr[DATA_W-1:0];
    rd_q <= mem[addr];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state  <= S_IDLE;
      addr   <= '0;
      target <= '0;
      count  <= '0;
      busy   <= 1'b0;
      ack    <= 1'b0;
      tx     <= '0;
    end else begin
      if (ack && !rxne) ack <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          busy   <= 1'b1;
          target <= param;
          count  <= '0;
          addr   <= '0;
          state  <= (param == '0 || param > DEPTH) ? S_END : S_CAPTURE;
        end
        S_CAPTURE: if (we) begin
          ack   <= 1'b1;
          addr  <= addr + 1'b1;
          count <= count + 1'b1;
          if (count + 1'b1 == target) begin
            addr  <= '0;
            count <= '0;
            state <= S_READ;
          end
        end
        S_READ: state <= S_SEND;                 // RAM read
        S_SEND: begin
          tx.data  <= SAMPLE_W'(rd_q);
          tx.num   <= 3'd5;
          tx.start <= 1'b1;
          state    <= S_TX_REQ;
        end
        S_TX_REQ: if (tx_busy) begin
          tx.start <= 1'b0;
          state    <= S_TX_WAIT;
        end
        S_TX_WAIT: if (!tx_busy) begin
          addr  <= addr + 1'b1;
          count <= count + 1'b1;
          state <= (count + 1'b1 == target) ? S_END : S_READ;
        end
        S_END: if (!start) begin
          busy  <= 1'b0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
