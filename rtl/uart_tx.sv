// UART transmitter, 8 data bits, no parity, 1 stop bit, LSB first.
// Runs on a clock of 16 times the baud rate: each bit is held for 16
// clocks. A byte is taken when send is high and busy is low; busy stays
// high for the 160 clocks of start bit, data and stop bit. txd idles high.
module uart_tx (
  input  logic       clk,
  input  logic       rst,
  input  logic       send,
  input  logic [7:0] data,
  output logic       busy,
  output logic       txd
);
  logic [9:0] frame;   // stop, data[7:0], start; shifted out from bit 0
  logic [3:0] tick;
  logic [3:0] nbit;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      frame <= '1;
      tick  <= '0;
      nbit  <= '0;
      busy  <= 1'b0;
      txd   <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (send) begin
        frame <= {1'b1, data, 1'b0};
        tick  <= '0;
        nbit  <= '0;
        busy  <= 1'b1;
        txd   <= 1'b0;
      end
    end else begin
      tick <= tick + 1'b1;
      if (tick == 4'd15) begin
        if (nbit == 4'd9) begin
          busy <= 1'b0;
          txd  <= 1'b1;
        end else begin
          nbit  <= nbit + 1'b1;
          frame <= {1'b1, frame[9:1]};
          txd   <= frame[1];
        end
      end
    end
  end
endmodule
