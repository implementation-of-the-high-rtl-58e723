// Supervisor state machine of the FPGA firmware (10 MHz domain).
//
// Reads user instructions from the RS-232 interface, one byte at a time
// while idle:
//   0x1F  state synchronisation: answers 0xFF.
//   0xAA  parameter upload: answers 0xAA, then takes one 5-byte word
//         (byte 0 function identifier, bytes 1..4 the 32-bit parameter,
//         low byte first) and echoes it, or answers five 0x00 bytes if it
//         is illegal and returns to idle.
//   0xBB  the same with the ROI window: answers 0xBB, then three 5-byte
//         words (identifier+parameter, ROI lower bound, ROI upper bound),
//         each echoed when received; a lower bound above the upper bound
//         is an error.
// A following 0xFF confirms and runs the function; any other byte drops
// it. To run a function the supervisor sets the channel, function and
// serial-port paths from the identifier (high nibble channel 0..3, low
// nibble task 1..4), applies ROI settings and parameter, raises fb_start
// until fb_busy is seen, and waits until fb_busy falls; then it is idle.
//
// The instruction codes, the echo/error protocol and the 0xFF
// confirmation follow the document; the byte order inside a word, the
// 0xBB reply, task 4 (histogram upload) and the legality rules (task 1..4,
// channel 0..3, parameter 1..2^32-1, synchronous sampling at most 65536
// samples) are this design's reading. Unknown first bytes are ignored.
// Serial requests use the Start/Busy four-phase handshake; rx_busy and
// tx_busy arrive synchronised to clk.
module supervisor
  import tdc_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  // receive request to the serial interface
  output logic               rx_start,
  output logic [2:0]         rx_num,
  input  sample_t            rx_data,
  input  logic               rx_busy,
  // transmit request
  output tx_req_t            tx,
  input  logic               tx_busy,
  // function control
  output logic               fb_start,
  input  logic               fb_busy,
  output task_e              task_sel,
  output logic [1:0]         ch_sel,
  output owner_e             owner,
  output logic [PARAM_W-1:0] param,
  output logic               roi_enable,
  output sample_t            roi_lower,
  output sample_t            roi_upper,
  output logic               instr_error   // one-clock pulse per rejected word
);
  typedef enum logic [3:0] {
    V_RX_CMD, V_CMD, V_RX_WORD, V_CHECK, V_RX_CONFIRM, V_CONFIRM,
    V_EXEC, V_EXEC_WAIT, V_RX_REQ, V_RX_WAIT, V_TX_REQ, V_TX_WAIT
  } state_e;

  state_e             state, ret;
  logic               roi_mode;
  logic [1:0]         word_idx;
  sample_t            word0, lower, upper;
  logic [7:0]         rx_byte;
  task_e              w_task;
  logic [3:0]         w_ch;
  logic [PARAM_W-1:0] w_param;
  logic               w_legal;

  assign rx_byte = rx_data[SAMPLE_W-1 -: 8];   // a 1-byte transfer fills byte 4

  // legality of the identifier/parameter word just received
  always_comb begin
    w_task  = task_e'(rx_data[3:0]);
    w_ch    = rx_data[7:4];
    w_param = rx_data[8 +: PARAM_W];
    w_legal = (w_ch <= 4'd3);
    unique case (w_task)
      TASK_ASYNC, TASK_HIST: w_legal = w_legal && (w_param != '0);
      TASK_SYNC:   w_legal = w_legal && (w_param != '0) && (w_param <= PARAM_W'(SYNC_MAX_SAMPLES));
      TASK_UPLOAD: ;
      default:     w_legal = 1'b0;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state       <= V_RX_CMD;
      ret         <= V_RX_CMD;
      rx_start    <= 1'b0;
      rx_num      <= '0;
      tx          <= '0;
      fb_start    <= 1'b0;
      task_sel    <= TASK_NONE;
      ch_sel      <= '0;
      owner       <= OWN_SUPERVISOR;
      param       <= '0;
      roi_enable  <= 1'b0;
      roi_lower   <= '0;
      roi_upper   <= '0;
      roi_mode    <= 1'b0;
      word_idx    <= '0;
      word0       <= '0;
      lower       <= '0;
      upper       <= '0;
      instr_error <= 1'b0;
    end else begin
      instr_error <= 1'b0;
      unique case (state)
        V_RX_CMD: begin
          rx_num <= 3'd1;
          ret    <= V_CMD;
          state  <= V_RX_REQ;
        end
        V_CMD: begin
          unique case (rx_byte)
            CMD_SYNC: begin
              tx.data <= {REPLY_SYNC, {(SAMPLE_W-8){1'b0}}};
              tx.num  <= 3'd1;
              ret     <= V_RX_CMD;
              state   <= V_TX_REQ;
            end
            CMD_PARAM, CMD_PARAM_ROI: begin
              roi_mode <= (rx_byte == CMD_PARAM_ROI);
              word_idx <= '0;
              tx.data  <= {rx_byte, {(SAMPLE_W-8){1'b0}}};
              tx.num   <= 3'd1;
              ret      <= V_RX_WORD;
              state    <= V_TX_REQ;
            end
            default: state <= V_RX_CMD;
          endcase
        end
        V_RX_WORD: begin
          rx_num <= 3'd5;
          ret    <= V_CHECK;
          state  <= V_RX_REQ;
        end
        V_CHECK: begin
          tx.num  <= 3'd5;
          tx.data <= rx_data;                   // echo
          state   <= V_TX_REQ;
          unique case (word_idx)
            2'd0: begin
              word0 <= rx_data;
              ret   <= roi_mode ? V_RX_WORD : V_RX_CONFIRM;
              if (!w_legal) begin
                tx.data     <= '0;
                ret         <= V_RX_CMD;
                instr_error <= 1'b1;
              end
            end
            2'd1: begin
              lower <= rx_data;
              ret   <= V_RX_WORD;
            end
            default: begin
              upper <= rx_data;
              ret   <= V_RX_CONFIRM;
              if (lower > rx_data) begin
                tx.data     <= '0;
                ret         <= V_RX_CMD;
                instr_error <= 1'b1;
              end
            end
          endcase
          word_idx <= word_idx + 1'b1;
        end
        V_RX_CONFIRM: begin
          rx_num <= 3'd1;
          ret    <= V_CONFIRM;
          state  <= V_RX_REQ;
        end
        V_CONFIRM: state <= (rx_byte == CONFIRM) ? V_EXEC : V_RX_CMD;
        V_EXEC: begin
          task_sel   <= task_e'(word0[3:0]);
          ch_sel     <= word0[5:4];
          param      <= word0[8 +: PARAM_W];
          roi_enable <= roi_mode;
          roi_lower  <= lower;
          roi_upper  <= upper;
          unique case (task_e'(word0[3:0]))
            TASK_ASYNC: owner <= OWN_ASYNC;
            TASK_SYNC:  owner <= OWN_SYNC;
            default:    owner <= OWN_HIST;
          endcase
          fb_start <= 1'b1;
          if (fb_busy && fb_start) begin
            fb_start <= 1'b0;
            state    <= V_EXEC_WAIT;
          end
        end
        V_EXEC_WAIT: if (!fb_busy) begin
          owner <= OWN_SUPERVISOR;
          state <= V_RX_CMD;
        end
        // serial port sub-sequences, returning to ret
        V_RX_REQ: begin
          rx_start <= 1'b1;
          if (rx_busy && rx_start) begin
            rx_start <= 1'b0;
            state    <= V_RX_WAIT;
          end
        end
        V_RX_WAIT: if (!rx_busy) state <= ret;
        V_TX_REQ: begin
          tx.start <= 1'b1;
          if (tx_busy && tx.start) begin
            tx.start <= 1'b0;
            state    <= V_TX_WAIT;
          end
        end
        V_TX_WAIT: if (!tx_busy) state <= ret;
        default: state <= V_RX_CMD;
      endcase
    end
  end
endmodule
