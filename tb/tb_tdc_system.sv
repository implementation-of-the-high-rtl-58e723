// End-to-end testbench for tdc_system at reduced sizes (64-bin histogram,
// 16-deep synchronous FIFO, fast UART clock, short loop timer) with the
// system clock divider at its default. Models: the THS788 result port
// (40-bit words, strobe low 40 clocks + 3 high, per channel) and a PC
// UART. It runs every instruction through the serial port and checks the
// replies and data:
//   sync 0x1F; asynchronous sampling on channel 1 (samples discarded while
//   the port is busy); synchronous sampling on channel 2; histogram with the
//   ROI window on channel 0 (words outside rejected) and its upload; an
//   illegal identifier; an unconfirmed command; bad ROI bounds; plus the
//   MCU side: an SPI transfer looped back, PWM in both directions, the
//   loop timer flag.
// Each mechanism is counted and one that never happened is a failure.
`timescale 1ns/1ps
module tb_tdc_system;
  import tdc_pkg::*;
  localparam int unsigned DIV_UART = 2;
  localparam int unsigned HIST_AW  = 6;
  localparam int unsigned DEPTH    = 16;
  localparam int unsigned LOOP_P   = 50;
  localparam int unsigned BIT_CLKS = 16 * 2 * (DIV_UART + 1);   // rclk per UART bit

  logic        rst = 1'b0, rclk = 1'b0, mcu_clk = 1'b0, mcu_rst = 1'b0;
  logic [3:0]  rstrobe_n = '1, rdata = '0;
  logic        uart_rxd = 1'b1, uart_txd;
  logic [15:0] spi_tx_data = '0, spi_rx_data;
  logic        spi_tx_valid = 1'b0, spi_done, spi_busy, spi_sclk, spi_mosi, spi_ss, spi_miso;
  logic [7:0]  pwm_compare = '0;
  logic        heat_dir = 1'b0, hb_in1, hb_in2, loop_tc_clear = 1'b0, loop_tc;

  int checks = 0, failures = 0;

  tdc_system #(
    .CLK_DIV_UART(DIV_UART), .HIST_ADDR_W(HIST_AW), .FIFO_DEPTH(DEPTH),
    .SPI_CLK_DIV(2), .LOOP_PERIOD(LOOP_P)
  ) dut (.*);

  always #1.667  rclk    = ~rclk;
  always #20.833 mcu_clk = ~mcu_clk;
  assign spi_miso = spi_mosi;             // loopback

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- counters
  int n_sync_reply = 0, n_echo = 0, n_error = 0, n_cancel = 0, n_discard = 0;
  int n_roi_reject = 0, n_hist_done = 0, n_upload = 0, n_sync_capture = 0, n_async = 0;
  int n_spi = 0, n_pwm_fwd = 0, n_pwm_rev = 0, n_loop_tc = 0, n_dec_drop = 0;

  always @(posedge dut.clk_sys) if (dut.async_discarded) n_discard++;
  int n_spi_sel = 0;
  always @(negedge spi_ss) n_spi_sel++;

  // ---------------------------------------------------------------- TMU model
  sample_t tmu_q [4][$];
  sample_t tmu_sent [4][$];

  for (genvar c = 0; c < 4; c++) begin : g_tmu
    initial begin
      forever begin
        @(negedge rclk);
        if (tmu_q[c].size() > 0) begin
          sample_t w;
          int gap;
          w = tmu_q[c].pop_front();
          for (int i = 0; i < 40; i++) begin
            rstrobe_n[c] = 1'b0;
            rdata[c]     = w[i];
            @(negedge rclk);
          end
          rstrobe_n[c] = 1'b1;
          tmu_sent[c].push_back(w);
          repeat (3) @(negedge rclk);
        end
      end
    end
  end

  // feed one channel with a word every 'spacing' rclk cycles while 'on'
  task automatic feed_words(input int c, input sample_t words [$], input int spacing);
    foreach (words[i]) begin
      tmu_q[c].push_back(words[i]);
      repeat (spacing) @(negedge rclk);
    end
  endtask

  // ---------------------------------------------------------------- PC UART
  logic [7:0] host_rx [$];

  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      repeat (BIT_CLKS / 2) @(posedge rclk);
      for (int i = 0; i < 8; i++) begin
        repeat (BIT_CLKS) @(posedge rclk);
        b[i] = uart_txd;
      end
      repeat (BIT_CLKS) @(posedge rclk);
      check(uart_txd, "stop bit");
      host_rx.push_back(b);
    end
  end

  task automatic host_send(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd = f[i];
      repeat (BIT_CLKS) @(posedge rclk);
    end
  endtask

  task automatic host_word(input sample_t w);
    for (int i = 0; i < 5; i++) host_send(w[i*8 +: 8]);
  endtask

  task automatic wait_bytes(input int n);
    int t = 0;
    while (host_rx.size() < n && t < 4_000_000) begin @(posedge rclk); t++; end
    check(host_rx.size() >= n, $sformatf("expected %0d bytes from the FPGA, got %0d", n, host_rx.size()));
  endtask

  function automatic sample_t pop_word();
    sample_t w = '0;
    for (int i = 0; i < 5; i++) if (host_rx.size() > 0) w[i*8 +: 8] = host_rx.pop_front();
    return w;
  endfunction

  function automatic sample_t id_word(input logic [3:0] ch, input logic [3:0] t, input logic [31:0] p);
    return {p, ch, t};
  endfunction

  // parameter upload; returns 1 if echoed
  task automatic upload_param(input logic [7:0] cmd, input sample_t words [$], output bit ok);
    sample_t e;
    host_rx.delete();
    host_send(cmd);
    wait_bytes(1);
    check(host_rx.pop_front() == cmd, "command acknowledged");
    ok = 1'b1;
    foreach (words[i]) begin
      host_word(words[i]);
      wait_bytes(5);
      e = pop_word();
      if (e == '0) begin ok = 1'b0; n_error++; break; end
      check(e == words[i], $sformatf("echo %h", e));
      n_echo++;
    end
  endtask

  task automatic wait_idle();
    int t = 0;
    while ((dut.fb_busy || dut.owner != OWN_SUPERVISOR) && t < 8_000_000) begin @(posedge rclk); t++; end
    check(!dut.fb_busy, "function finished");
    repeat (200) @(posedge rclk);
  endtask

  initial begin
    bit ok;
    bit feeding;
    sample_t words [$];
    sample_t w, lo, hi;
    int ref_hist [2**HIST_AW];

    #1 rst = 1'b1; mcu_rst = 1'b1;   // asynchronous reset edge
    repeat (100) @(posedge rclk);
    rst = 1'b0;
    mcu_rst = 1'b0;
    // histogram RAM clear after reset
    wait (!dut.busy_hist);
    repeat (100) @(posedge rclk);

    // ---- sync
    host_send(CMD_SYNC);
    wait_bytes(1);
    if (host_rx.size() > 0 && host_rx.pop_front() == REPLY_SYNC) n_sync_reply++;

    // ---- asynchronous sampling, channel 1, 4 samples
    upload_param(CMD_PARAM, '{id_word(4'd1, 4'd1, 32'd4)}, ok);
    check(ok, "async accepted");
    host_send(CONFIRM);
    feeding = 1'b1;
    fork
      begin
        wait (dut.busy_async);
        while (feeding) begin
          tmu_q[1].push_back({8'h01, 32'($urandom())});
          repeat (150) @(negedge rclk);
        end
      end
      begin
        wait_bytes(20);
        feeding = 1'b0;
      end
    join
    wait_idle();
    tmu_q[1].delete();
    begin
      int idx = 0;
      for (int k = 0; k < 4; k++) begin
        bit found = 1'b0;
        w = pop_word();
        for (int j = idx; j < tmu_sent[1].size(); j++)
          if (!found && tmu_sent[1][j] == w) begin found = 1'b1; idx = j + 1; end
        check(found, $sformatf("async word %h sent by the TMU, in order", w));
        if (found) n_async++;
      end
    end
    repeat (2000) @(posedge rclk);
    host_rx.delete();

    // ---- synchronous sampling, channel 2, 5 samples
    upload_param(CMD_PARAM, '{id_word(4'd2, 4'd3, 32'd5)}, ok);
    check(ok, "sync accepted");
    host_send(CONFIRM);
    words.delete();
    for (int i = 0; i < 5; i++) words.push_back({8'h02, 32'($urandom())});
    wait (dut.busy_sync);
    tmu_sent[2].delete();
    feed_words(2, words, 400);
    wait_bytes(25);
    wait_idle();
    for (int k = 0; k < 5; k++) begin
      w = pop_word();
      check(w == words[k], $sformatf("sync word %0d = %h, expected %h", k, w, words[k]));
      if (w == words[k]) n_sync_capture++;
    end

    // ---- histogram with ROI on channel 0: 11..49 kept
    lo = 40'd10; hi = 40'd50;
    upload_param(CMD_PARAM_ROI, '{id_word(4'd0, 4'd2, 32'd12), lo, hi}, ok);
    check(ok, "histogram accepted");
    host_send(CONFIRM);
    wait (dut.busy_hist);
    repeat (2**HIST_AW + 20) @(posedge dut.clk_sys);  // RAM clear done
    foreach (ref_hist[i]) ref_hist[i] = 0;
    words.delete();
    begin
      int kept = 0;
      for (int i = 0; i < 30; i++) begin
        w = 40'($urandom_range(0, 63));
        words.push_back(w);
        if (w > lo && w < hi) begin
          if (kept < 12) ref_hist[w[HIST_AW-1:0]]++;
          kept++;
        end else n_roi_reject++;
      end
    end
    feed_words(0, words, 400);
    wait_bytes(1);
    wait_idle();
    if (host_rx.size() > 0 && host_rx.pop_front() == HIST_DONE) n_hist_done++;
    check(n_hist_done == 1, "histogram finished message");
    host_rx.delete();

    // ---- histogram upload
    upload_param(CMD_PARAM, '{id_word(4'd0, 4'd4, 32'd0)}, ok);
    host_send(CONFIRM);
    wait_bytes(2 * (2**HIST_AW));
    wait_idle();
    begin
      int bad = 0;
      for (int b = 0; b < 2**HIST_AW; b++) begin
        int cnt;
        cnt = host_rx.pop_front();
        cnt = cnt | (int'(host_rx.pop_front()) << 8);
        if (cnt != ref_hist[b]) begin
          bad++;
          $display("bin %0d = %0d, expected %0d", b, cnt, ref_hist[b]);
        end
      end
      check(bad == 0, "uploaded histogram matches");
      if (bad == 0) n_upload++;
    end
    host_rx.delete();

    // ---- illegal identifier
    upload_param(CMD_PARAM, '{id_word(4'd0, 4'd9, 32'd5)}, ok);
    check(!ok, "illegal task rejected");

    // ---- not confirmed
    upload_param(CMD_PARAM, '{id_word(4'd0, 4'd1, 32'd5)}, ok);
    host_send(8'h12);
    repeat (40 * BIT_CLKS) @(posedge rclk);
    check(!dut.busy_async && host_rx.size() == 0, "unconfirmed command not run");
    host_send(CMD_SYNC);
    wait_bytes(1);
    if (host_rx.size() > 0 && host_rx.pop_front() == REPLY_SYNC) begin n_cancel++; n_sync_reply++; end

    // ---- bad ROI bounds
    upload_param(CMD_PARAM_ROI, '{id_word(4'd0, 4'd1, 32'd5), hi, lo}, ok);
    check(!ok, "lower above upper rejected");

    // ---- MCU peripherals
    @(negedge mcu_clk);
    spi_tx_data = 16'hC35A; spi_tx_valid = 1'b1;
    @(negedge mcu_clk);
    spi_tx_valid = 1'b0;
    wait (spi_done);
    if (spi_rx_data == 16'hC35A && n_spi_sel == 1) n_spi++;
    repeat (2) @(negedge mcu_clk);
    check(spi_ss, "SPI select released one clock after the word");
    pwm_compare = 8'd100;
    heat_dir = 1'b0;
    repeat (600) begin
      @(posedge mcu_clk);
      if (hb_in1) n_pwm_fwd++;
      check(!hb_in2, "IN2 low in forward");
    end
    heat_dir = 1'b1;
    repeat (2) @(posedge mcu_clk);
    repeat (600) begin
      @(posedge mcu_clk);
      if (hb_in2) n_pwm_rev++;
      check(!hb_in1, "IN1 low in reverse");
    end
    wait (loop_tc);
    n_loop_tc++;

    $display("mechanisms: sync=%0d echo=%0d error=%0d cancel=%0d async=%0d discard=%0d sync_capture=%0d roi_reject=%0d hist_done=%0d upload=%0d spi=%0d pwm_fwd=%0d pwm_rev=%0d loop_tc=%0d",
             n_sync_reply, n_echo, n_error, n_cancel, n_async, n_discard, n_sync_capture, n_roi_reject,
             n_hist_done, n_upload, n_spi, n_pwm_fwd, n_pwm_rev, n_loop_tc);
    check(n_sync_reply >= 2, "sync reply happened");
    check(n_echo > 0, "parameter echo happened");
    check(n_error == 2, "instruction error happened twice");
    check(n_cancel == 1, "unconfirmed command happened");
    check(n_async == 4, "asynchronous samples sent");
    check(n_discard > 0, "asynchronous discard happened");
    check(n_sync_capture == 5, "synchronous capture happened");
    check(n_roi_reject > 0, "ROI rejection happened");
    check(n_hist_done == 1, "histogram finished");
    check(n_upload == 1, "histogram upload happened");
    check(n_spi == 1, "SPI loopback transfer happened");
    check(n_pwm_fwd > 0 && n_pwm_rev > 0, "PWM drove both directions");
    check(n_loop_tc == 1, "loop timer fired");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge rclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
