// SPI master of the MCU, used to program the CDCE62002 clock generator.
//
// Full duplex, WORD_W-bit words (16), clock polarity 0 and phase 0, least
// significant bit first, as configured in the document: SCLK idles low,
// each bit is put on MOSI before the rising edge on which both sides
// sample, and the master changes MOSI and counts the bit on the falling
// edge. SCLK runs at f_clk / (2*CLK_DIV) (rate not given, this design's
// choice). tx_valid while idle loads tx_data and starts the transfer;
// busy is high for WORD_W SCLK periods; then rx_data holds the received
// word and done stays set until the next transfer starts (the status flag
// the driver polls). ss, the active-low select wired to the clock
// generator's latch enable, falls with the first bit of a transfer. If
// tx_valid is high in the clock after a word ends, the next word follows
// with ss kept low, so two 16-bit words form one 32-bit register frame;
// otherwise ss rises in that clock, which latches the frame. The port
// names follow the SPI Master component of the document; the chaining
// rule is this design's choice.
module spi_master #(
  parameter int unsigned WORD_W  = 16,
  parameter int unsigned CLK_DIV = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [WORD_W-1:0] tx_data,
  input  logic              tx_valid,
  output logic [WORD_W-1:0] rx_data,
  output logic              done,
  output logic              busy,
  output logic              sclk,
  output logic              mosi,
  output logic              ss,
  input  logic              miso
);
  localparam int unsigned DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam int unsigned BW = $clog2(WORD_W);

  logic [WORD_W-1:0] tx_sh, rx_sh;
  logic [DW-1:0]     div;
  logic [BW-1:0]     nbit;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      tx_sh   <= '0;
      rx_sh   <= '0;
      rx_data <= '0;
      div     <= '0;
      nbit    <= '0;
      done    <= 1'b0;
      busy    <= 1'b0;
      sclk    <= 1'b0;
      mosi    <= 1'b0;
      ss      <= 1'b1;
    end else if (!busy) begin
      ss <= !tx_valid;
      if (tx_valid) begin
        tx_sh <= tx_data;
        mosi  <= tx_data[0];
        div   <= '0;
        nbit  <= '0;
        done  <= 1'b0;
        busy  <= 1'b1;
      end
    end else if (div == DW'(CLK_DIV - 1)) begin
      div  <= '0;
      sclk <= ~sclk;
      if (!sclk) begin                          // rising edge: sample MISO
        rx_sh <= {miso, rx_sh[WORD_W-1:1]};
      end else begin                            // falling edge: next bit
        if (nbit == BW'(WORD_W - 1)) begin
          busy    <= 1'b0;
          done    <= 1'b1;
          rx_data <= rx_sh;
        end else begin
          nbit  <= nbit + 1'b1;
          tx_sh <= {1'b0, tx_sh[WORD_W-1:1]};
          mosi  <= tx_sh[1];
        end
      end
    end else begin
      div <= div + 1'b1;
    end
  end
endmodule
