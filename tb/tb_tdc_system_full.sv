// Full-size testbench for tdc_system: every parameter at its default
// (10 MHz system clock, RCLK/162 UART clock, 65536-bin histogram, 65536-deep
// synchronous FIFO). It waits for the histogram RAM clear after reset,
// sends the sync instruction, then runs a synchronous read of 4 samples on
// channel 3 from a THS788 result-port model and checks the uploaded words.
`timescale 1ns/1ps
module tb_tdc_system_full;
  import tdc_pkg::*;
  localparam int unsigned BIT_CLKS = 16 * 2 * (80 + 1);   // rclk per UART bit

  logic        rst = 1'b0, rclk = 1'b0, mcu_clk = 1'b0, mcu_rst = 1'b0;
  logic [3:0]  rstrobe_n = '1, rdata = '0;
  logic        uart_rxd = 1'b1, uart_txd;
  logic [15:0] spi_tx_data = '0, spi_rx_data;
  logic        spi_tx_valid = 1'b0, spi_done, spi_busy, spi_sclk, spi_mosi, spi_ss, spi_miso;
  logic [7:0]  pwm_compare = '0;
  logic        heat_dir = 1'b0, hb_in1, hb_in2, loop_tc_clear = 1'b0, loop_tc;

  int checks = 0, failures = 0;

  tdc_system dut (.*);

  always #1.667  rclk    = ~rclk;
  always #20.833 mcu_clk = ~mcu_clk;
  assign spi_miso = 1'b0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // THS788 result port, channel 3
  task automatic tmu_word(input sample_t w);
    for (int i = 0; i < 40; i++) begin
      @(negedge rclk);
      rstrobe_n[3] = 1'b0;
      rdata[3]     = w[i];
    end
    @(negedge rclk);
    rstrobe_n[3] = 1'b1;
    repeat (3) @(negedge rclk);
  endtask

  // PC UART
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

  task automatic wait_bytes(input int n);
    int t = 0;
    while (host_rx.size() < n && t < 3_000_000) begin @(posedge rclk); t++; end
    check(host_rx.size() >= n, $sformatf("expected %0d bytes, got %0d", n, host_rx.size()));
  endtask

  function automatic sample_t pop_word();
    sample_t w = '0;
    for (int i = 0; i < 5; i++) if (host_rx.size() > 0) w[i*8 +: 8] = host_rx.pop_front();
    return w;
  endfunction

  initial begin
    sample_t id, w;
    sample_t words [4];

    #1 rst = 1'b1; mcu_rst = 1'b1;   // asynchronous reset edge
    repeat (100) @(posedge rclk);
    rst = 1'b0;
    mcu_rst = 1'b0;
    @(posedge dut.clk_sys);
    check(dut.busy_hist, "histogram RAM clear after reset");
    wait (!dut.busy_hist);

    host_send(CMD_SYNC);
    wait_bytes(1);
    check(host_rx.pop_front() == REPLY_SYNC, "sync reply");

    id = {32'd4, 4'd3, 4'd3};           // channel 3, synchronous read, 4 samples
    host_send(CMD_PARAM);
    wait_bytes(1);
    check(host_rx.pop_front() == CMD_PARAM, "command acknowledged");
    for (int i = 0; i < 5; i++) host_send(id[i*8 +: 8]);
    wait_bytes(5);
    w = pop_word();
    check(w == id, $sformatf("identifier echo %h", w));
    host_send(CONFIRM);
    wait (dut.busy_sync);

    foreach (words[i]) begin
      words[i] = {8'hA0 + 8'(i), 32'($urandom())};
      tmu_word(words[i]);
      repeat (400) @(negedge rclk);
    end
    wait_bytes(20);
    foreach (words[i]) begin
      w = pop_word();
      check(w == words[i], $sformatf("sample %0d = %h, expected %h", i, w, words[i]));
    end
    wait (!dut.busy_sync);
    repeat (10) @(posedge dut.clk_sys);
    check(dut.owner == OWN_SUPERVISOR, "port returned to the supervisor");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge rclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
