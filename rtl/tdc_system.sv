// Time measurement system: FPGA firmware and MCU-side peripherals.
//
// FPGA part. The THS788 time measurement unit delivers 40-bit time stamps
// for four channels on a serial result port (RCLK, one strobe and one data
// line per channel). Four decoders, clocked by RCLK (300 MHz), turn them
// into words, optionally filtered by the ROI window. A clock distributer
// derives from RCLK the 10 MHz clock of the supervisor and the function
// blocks and the 16x baud clock of the RS-232 interface. The supervisor
// takes instructions from the PC; for a measurement it points the channel
// multiplexer at one decoder, the function block selector at one of three
// function blocks (asynchronous reading, histogram, synchronous reading)
// and the serial interface multiplexer at the same block, starts it and
// waits until it is no longer busy. Signals that cross between the three
// clock domains are single-bit request/busy levels, each passed through a
// two flip-flop synchroniser; the data words they guard are held stable by
// the four-phase handshakes. ROI and path settings change only between
// measurements. Reset is one asynchronous input, released separately in
// each domain.
//
// MCU part (separate clock, 24 MHz). The digital peripherals of the PSoC
// that the temperature control and the clock-generator set-up use: the SPI
// master for the CDCE62002, the PWM generator and direction
// de-multiplexer that drive the H-bridge inputs, and the 20 ms loop timer.
// The CPU that computes duty and direction, the H-bridge, the ADC of the
// temperature sensor and the TMU itself are outside this RTL; their
// signals are ports. LVDS input buffers are also outside: ports are
// single-ended.
module tdc_system
  import tdc_pkg::*;
#(
  parameter int unsigned CLK_DIV_SYS  = 14,
  parameter int unsigned CLK_DIV_UART = 80,
  parameter int unsigned HIST_ADDR_W  = 16,
  parameter int unsigned FIFO_DEPTH   = 65536,
  parameter int unsigned SPI_CLK_DIV  = 4,
  parameter int unsigned LOOP_PERIOD  = 20000
) (
  // ---- FPGA ----
  input  logic        rst,
  input  logic        rclk,
  input  logic [3:0]  rstrobe_n,
  input  logic [3:0]  rdata,
  input  logic        uart_rxd,
  output logic        uart_txd,
  // ---- MCU peripherals ----
  input  logic        mcu_clk,
  input  logic        mcu_rst,
  input  logic [15:0] spi_tx_data,
  input  logic        spi_tx_valid,
  output logic [15:0] spi_rx_data,
  output logic        spi_done,
  output logic        spi_busy,
  output logic        spi_sclk,
  output logic        spi_mosi,
  output logic        spi_ss,
  input  logic        spi_miso,
  input  logic [7:0]  pwm_compare,
  input  logic        heat_dir,
  output logic        hb_in1,
  output logic        hb_in2,
  input  logic        loop_tc_clear,
  output logic        loop_tc
);
  // ------------------------------------------------------------ clocks/resets
  logic clk_sys, clk_uart;
  logic rst_rclk, rst_sys, rst_uart;

  reset_sync u_rst_rclk (.clk(rclk), .rst_in(rst), .rst_out(rst_rclk));

  clock_distributer #(.DIV_SYS(CLK_DIV_SYS), .DIV_UART(CLK_DIV_UART)) u_clocks (
    .clk_in(rclk), .rst(rst_rclk), .clk_sys, .clk_uart
  );

  reset_sync u_rst_sys  (.clk(clk_sys),  .rst_in(rst), .rst_out(rst_sys));
  reset_sync u_rst_uart (.clk(clk_uart), .rst_in(rst), .rst_out(rst_uart));

  // ------------------------------------------------------------ supervisor outputs
  logic               roi_enable;
  sample_t            roi_lower, roi_upper;
  task_e              task_sel;
  logic [1:0]         ch_sel;
  owner_e             owner;
  logic [PARAM_W-1:0] param;
  logic               fb_start, fb_busy, fb_ack;

  // ------------------------------------------------------------ TMU decoders
  sample_t    dec_dr [4];
  logic [3:0] dec_rxne, dec_rxne_s, dec_ack;

  for (genvar ch = 0; ch < 4; ch++) begin : g_dec
    tmu_serial_decoder #(.DATA_W(SAMPLE_W)) u_dec (
      .rclk, .rst(rst_rclk),
      .rstrobe_n(rstrobe_n[ch]), .rdata(rdata[ch]),
      .roi_enable, .roi_lower, .roi_upper,
      .ack(dec_ack[ch]), .dr(dec_dr[ch]), .rxne(dec_rxne[ch])
    );
  end

  sync_2ff #(.W(4)) u_rxne_sync (.clk(clk_sys), .rst(rst_sys), .d(dec_rxne), .q(dec_rxne_s));

  sample_t sel_dr;
  logic    sel_rxne;

  tdc_channel_mux #(.N_CH(4)) u_ch_mux (
    .sel(ch_sel), .dr_in(dec_dr), .rxne_in(dec_rxne_s), .ack_in(fb_ack),
    .dr(sel_dr), .rxne(sel_rxne), .ack_out(dec_ack)
  );

  // ------------------------------------------------------------ function blocks
  logic    start_async, start_hist, start_upload, start_sync;
  logic    busy_async, busy_hist, busy_sync;
  logic    ack_async, ack_hist, ack_sync;
  logic    async_discarded;
  tx_req_t src_tx [4];
  logic [3:0] src_busy;

  fb_selector u_fb_sel (
    .task_sel, .start(fb_start), .busy(fb_busy), .ack(fb_ack),
    .start_async, .start_hist, .start_upload, .start_sync,
    .busy_async, .busy_hist, .busy_sync,
    .ack_async, .ack_hist, .ack_sync
  );

  async_read_fb u_async (
    .clk(clk_sys), .rst(rst_sys), .start(start_async), .busy(busy_async), .param,
    .dr(sel_dr), .rxne(sel_rxne), .ack(ack_async),
    .tx(src_tx[OWN_ASYNC]), .tx_busy(src_busy[OWN_ASYNC]), .discarded(async_discarded)
  );

  histogram_fb #(.ADDR_W(HIST_ADDR_W), .CNT_W(16)) u_hist (
    .clk(clk_sys), .rst(rst_sys), .start(start_hist), .start_upload, .busy(busy_hist), .param,
    .dr(sel_dr), .rxne(sel_rxne), .ack(ack_hist),
    .tx(src_tx[OWN_HIST]), .tx_busy(src_busy[OWN_HIST])
  );

  sync_read_fb #(.DEPTH(FIFO_DEPTH), .DATA_W(SAMPLE_W)) u_sync (
    .clk(clk_sys), .rst(rst_sys), .start(start_sync), .busy(busy_sync), .param,
    .dr(sel_dr), .rxne(sel_rxne), .ack(ack_sync),
    .tx(src_tx[OWN_SYNC]), .tx_busy(src_busy[OWN_SYNC])
  );

  // ------------------------------------------------------------ supervisor
  logic       rx_start, rx_busy, rx_busy_s;
  logic [2:0] rx_num;
  sample_t    rx_data;
  logic       tx_busy, tx_busy_s;
  tx_req_t    tx;
  logic       instr_error;

  supervisor u_supervisor (
    .clk(clk_sys), .rst(rst_sys),
    .rx_start, .rx_num, .rx_data, .rx_busy(rx_busy_s),
    .tx(src_tx[OWN_SUPERVISOR]), .tx_busy(src_busy[OWN_SUPERVISOR]),
    .fb_start, .fb_busy, .task_sel, .ch_sel, .owner, .param,
    .roi_enable, .roi_lower, .roi_upper, .instr_error
  );

  serial_if_mux u_ser_mux (
    .sel(owner), .src_tx, .tx, .tx_busy(tx_busy_s), .src_busy
  );

  // ------------------------------------------------------------ RS-232
  sync_2ff #(.W(2)) u_busy_sync (
    .clk(clk_sys), .rst(rst_sys), .d({tx_busy, rx_busy}), .q({tx_busy_s, rx_busy_s})
  );

  rs232_serial_interface u_rs232 (
    .clk(clk_uart), .rst(rst_uart),
    .tx_start(tx.start), .tx_num(tx.num), .tx_data(tx.data), .tx_busy,
    .rx_start, .rx_num, .rx_data, .rx_busy,
    .txd(uart_txd), .rxd(uart_rxd)
  );

  // ------------------------------------------------------------ MCU peripherals
  logic pwm;

  spi_master #(.WORD_W(16), .CLK_DIV(SPI_CLK_DIV)) u_spi (
    .clk(mcu_clk), .rst(mcu_rst), .tx_data(spi_tx_data), .tx_valid(spi_tx_valid),
    .rx_data(spi_rx_data), .done(spi_done), .busy(spi_busy),
    .sclk(spi_sclk), .mosi(spi_mosi), .ss(spi_ss), .miso(spi_miso)
  );

  pwm_generator #(.W(8), .PERIOD(255)) u_pwm (
    .clk(mcu_clk), .rst(mcu_rst), .compare(pwm_compare), .pwm
  );

  direction_demux u_dir (.sel(heat_dir), .din(pwm), .dout({hb_in2, hb_in1}));

  loop_timer #(.PRESCALE(24), .PERIOD(LOOP_PERIOD)) u_loop (
    .clk(mcu_clk), .rst(mcu_rst), .tc_clear(loop_tc_clear), .tc(loop_tc)
  );
endmodule
