// Testbench for rs232_serial_interface. A host UART model (16 clocks per
// bit, 8N1) receives what the block sends and sends bytes to it. Checks:
// a 5-byte request sends bytes 0..4 of the word in that order, a 1- and a
// 2-byte request send only the top byte(s), each bit is sampled 16 clocks
// apart at its middle, and an n-byte transfer keeps busy for 160*n clocks; receive requests assemble bytes into the top of
// rx_data, also when the bytes arrived before the request (FIFO); the
// Start/Busy handshake (busy rises after start, falls after start is low).
`timescale 1ns/1ps
module tb_rs232_serial_interface;
  import tdc_pkg::*;
  logic       clk = 1'b0, rst = 1'b1;
  logic       tx_start = 1'b0, rx_start = 1'b0;
  logic [2:0] tx_num = '0, rx_num = '0;
  sample_t    tx_data = '0, rx_data;
  logic       tx_busy, rx_busy, txd, rxd = 1'b1;
  int         checks = 0, failures = 0;
  logic [7:0] host_rx_q [$];

  rs232_serial_interface dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // host receiver: finds the middle of the start bit 8 clocks after the
  // falling edge, then samples every 16 clocks
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (8) @(posedge clk);
      check(txd == 1'b0, "start bit low at its middle");
      for (int i = 0; i < 8; i++) begin
        repeat (16) @(posedge clk);
        b[i] = txd;
      end
      repeat (16) @(posedge clk);
      check(txd == 1'b1, "stop bit high");
      host_rx_q.push_back(b);
    end
  end

  task automatic host_send(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (16) @(posedge clk);
    end
  endtask

  task automatic do_tx(input logic [2:0] n, input sample_t d);
    int t0, t1;
    @(negedge clk);
    tx_num = n; tx_data = d; tx_start = 1'b1;
    t0 = 0;
    while (!tx_busy) begin @(negedge clk); t0++; end
    check(t0 <= 4, $sformatf("tx busy after %0d clocks", t0));
    tx_start = 1'b0; tx_data = '0;
    t1 = 0;
    while (tx_busy) begin @(negedge clk); t1++; end
    check(t1 >= 160 * n && t1 <= 160 * n + 40, $sformatf("tx of %0d bytes took %0d clocks", n, t1));
    repeat (30) @(negedge clk);
  endtask

  task automatic do_rx(input logic [2:0] n, output sample_t d);
    @(negedge clk);
    rx_num = n; rx_start = 1'b1;
    while (!rx_busy) @(negedge clk);
    rx_start = 1'b0;
    while (rx_busy) @(negedge clk);
    d = rx_data;
  endtask

  initial begin
    sample_t w, got;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
    check(txd == 1'b1 && !tx_busy && !rx_busy, "idle after reset");

    // 5-byte transmit, bytes 0..4 in order
    for (int k = 0; k < 3; k++) begin
      w = {$urandom(), $urandom()};
      host_rx_q.delete();
      do_tx(3'd5, w);
      check(host_rx_q.size() == 5, $sformatf("5 bytes received, got %0d", host_rx_q.size()));
      for (int i = 0; i < 5 && i < host_rx_q.size(); i++)
        check(host_rx_q[i] == w[i*8 +: 8], $sformatf("byte %0d = %h, expected %h", i, host_rx_q[i], w[i*8 +: 8]));
    end
    // 1- and 2-byte transmits take the upper bytes
    w = 40'hA1_B2_C3_D4_E5;
    host_rx_q.delete();
    do_tx(3'd1, w);
    check(host_rx_q.size() == 1 && host_rx_q[0] == 8'hA1, "1-byte transfer sends byte 4");
    host_rx_q.delete();
    do_tx(3'd2, w);
    check(host_rx_q.size() == 2 && host_rx_q[0] == 8'hB2 && host_rx_q[1] == 8'hA1, "2-byte transfer sends bytes 3,4");

    // receive 5 bytes with the request already waiting
    fork
      begin
        repeat (50) @(posedge clk);
        host_send(8'h11); host_send(8'h22); host_send(8'h33); host_send(8'h44); host_send(8'h55);
      end
      do_rx(3'd5, got);
    join
    check(got == 40'h55_44_33_22_11, $sformatf("rx 5 bytes %h", got));

    // bytes sent before the request wait in the FIFO
    host_send(8'hC0); host_send(8'hDE);
    repeat (20) @(posedge clk);
    do_rx(3'd2, got);
    check(got == 40'hDE_C0_00_00_00, $sformatf("rx 2 buffered bytes %h", got));
    host_send(8'h7E);
    repeat (20) @(posedge clk);
    do_rx(3'd1, got);
    check(got == 40'h7E_00_00_00_00, $sformatf("rx 1 byte %h", got));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
