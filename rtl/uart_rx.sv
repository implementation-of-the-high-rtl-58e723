// UART receiver, 8 data bits, no parity, 1 stop bit, LSB first, on a clock
// of 16 times the baud rate. The line is synchronised with two flip-flops.
// A falling edge starts a frame; the start bit is checked 8 clocks later
// (mid-bit) and each following bit is sampled 16 clocks apart. A byte with
// a high stop bit is presented on data with a one-clock valid pulse; a
// frame with a low stop bit is discarded.
module uart_rx (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} state_e;

  state_e     state;
  logic       rxd_s;
  logic [3:0] tick;
  logic [2:0] nbit;
  logic [7:0] shreg;

  sync_2ff u_rxd_sync (.clk, .rst, .d(rxd), .q(rxd_s));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= R_IDLE;
      tick  <= '0;
      nbit  <= '0;
      shreg <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      tick  <= tick + 1'b1;
      unique case (state)
        R_IDLE: begin
          tick <= '0;
          if (!rxd_s) state <= R_START;
        end
        R_START: if (tick == 4'd7) begin
          tick <= '0;
          nbit <= '0;
          state <= rxd_s ? R_IDLE : R_DATA;   // glitch: not a start bit
        end
        R_DATA: if (tick == 4'd15) begin
          shreg <= {rxd_s, shreg[7:1]};
          nbit  <= nbit + 1'b1;
          if (nbit == 3'd7) state <= R_STOP;
        end
        R_STOP: if (tick == 4'd15) begin
          state <= R_IDLE;
          if (rxd_s) begin
            data  <= shreg;
            valid <= 1'b1;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
