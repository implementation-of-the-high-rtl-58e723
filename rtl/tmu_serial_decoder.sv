// TMU serial result decoder, one channel.
//
// The THS788 sends each time stamp on its result port as a burst of bits
// on RData while RStrobe is low, clocked by RCLK. A 40-bit shift register
// shifts while the strobe is low: each bit enters at the top and moves down,
// so after 40 clocks the first bit received is bit 0. When the strobe
// returns high the word is complete; if the ROI window is enabled, only a
// word strictly between the lower and upper bound is kept. A kept word is
// copied into DR and RXNE is raised (this follows the document).
//
// RXNE/ACK is a four-phase request-acknowledge pair with a reader in another
// clock domain: ACK is synchronised here, RXNE falls when ACK is seen high,
// and a new word is only posted once ACK has fallen again. A word completed
// while RXNE is still pending is dropped, so DR never changes while it is
// being read (choice of this design). RXNE rises on the RCLK edge after the
// one that samples the strobe high. ROI settings are quasi-static: they are
// written by the supervisor only while no function block runs.
module tmu_serial_decoder #(
  parameter int unsigned DATA_W = 40
) (
  input  logic              rclk,
  input  logic              rst,
  input  logic              rstrobe_n,
  input  logic              rdata,
  input  logic              roi_enable,
  input  logic [DATA_W-1:0] roi_lower,
  input  logic [DATA_W-1:0] roi_upper,
  input  logic              ack,
  output logic [DATA_W-1:0] dr,
  output logic              rxne
);
  typedef enum logic {S_IDLE, S_RECEIVE} state_e;

  state_e            state;
  logic [DATA_W-1:0] shreg;
  logic              ack_s;
  logic              in_window;

  sync_2ff u_ack_sync (.clk(rclk), .rst, .d(ack), .q(ack_s));

  // Shift register, enabled by the active-low strobe
  always_ff @(posedge rclk or posedge rst) begin
    if (rst)             shreg <= '0;
    else if (!rstrobe_n) shreg <= {rdata, shreg[DATA_W-1:1]};
  end

  assign in_window = !roi_enable || ((shreg > roi_lower) && (shreg < roi_upper));

  always_ff @(posedge rclk or posedge rst) begin
    if (rst) begin
      state <= S_IDLE;
      dr    <= '0;
      rxne  <= 1'b0;
    end else begin
      if (ack_s) rxne <= 1'b0;
      unique case (state)
        S_IDLE:    if (!rstrobe_n) state <= S_RECEIVE;
        S_RECEIVE: if (rstrobe_n) begin
          state <= S_IDLE;
          if (in_window && !rxne && !ack_s) begin
            dr   <= shreg;
            rxne <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
