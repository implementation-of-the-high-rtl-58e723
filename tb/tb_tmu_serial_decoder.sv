// Testbench for tmu_serial_decoder. A model of the THS788 result port sends
// 40-bit words LSB first while the strobe is low (40 clocks), followed by
// 3 clocks with the strobe high (43 clocks per word). Checks: the word in
// DR, RXNE one clock after the strobe returns high, RXNE cleared by ACK,
// the ROI window (strictly inside kept, on or outside the bounds dropped,
// everything kept with ROI disabled) and that a word arriving while RXNE
// is pending is dropped without disturbing DR.
`timescale 1ns/1ps
module tb_tmu_serial_decoder;
  logic        rclk = 1'b0, rst = 1'b1;
  logic        rstrobe_n = 1'b1, rdata = 1'b0;
  logic        roi_enable = 1'b0, ack = 1'b0;
  logic [39:0] roi_lower = '0, roi_upper = '0;
  logic [39:0] dr;
  logic        rxne;
  int          checks = 0, failures = 0;

  tmu_serial_decoder dut (.*);

  always #1.667 rclk = ~rclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send_word(input logic [39:0] w);
    for (int i = 0; i < 40; i++) begin
      @(negedge rclk);
      rstrobe_n = 1'b0;
      rdata     = w[i];
    end
    @(negedge rclk);
    rstrobe_n = 1'b1;
  endtask

  // four-phase acknowledge as the reader does it
  task automatic do_ack();
    @(negedge rclk) ack = 1'b1;
    wait (!rxne);
    @(negedge rclk) ack = 1'b0;
    repeat (3) @(negedge rclk);      // ack falls through the synchroniser
  endtask

  // send and expect the word to be kept (or not)
  task automatic send_expect(input logic [39:0] w, input bit kept);
    int lat = 0;
    send_word(w);
    // strobe is high from this negedge; RXNE must rise after the next posedge
    @(posedge rclk); #0.1;
    lat = 1;
    check(rxne == kept, $sformatf("word %h kept=%0d, rxne=%0d one clock after strobe", w, kept, rxne));
    if (kept) begin
      check(dr == w, $sformatf("DR %h, expected %h", dr, w));
      do_ack();
      check(!rxne, "RXNE cleared by ACK");
    end
    repeat (2) @(negedge rclk);
  endtask

  initial begin
    logic [39:0] w, held;
    repeat (4) @(negedge rclk);
    rst = 1'b0;
    repeat (4) @(negedge rclk);
    check(!rxne, "RXNE low after reset");

    // ROI disabled: every word passes
    send_expect(40'h00_0000_0001, 1'b1);
    send_expect(40'h80_1234_5678, 1'b1);
    send_expect(40'hFF_FFFF_FFFF, 1'b1);
    for (int i = 0; i < 20; i++) begin
      w = {$urandom(), $urandom()};
      send_expect(w, 1'b1);
    end

    // ROI window 1000 < DR < 2000
    roi_enable = 1'b1;
    roi_lower  = 40'd1000;
    roi_upper  = 40'd2000;
    send_expect(40'd1500, 1'b1);
    send_expect(40'd1001, 1'b1);
    send_expect(40'd1999, 1'b1);
    send_expect(40'd1000, 1'b0);
    send_expect(40'd2000, 1'b0);
    send_expect(40'd5,    1'b0);
    send_expect(40'h10_0000_0000, 1'b0);
    for (int i = 0; i < 20; i++) begin
      w = 40'($urandom_range(0, 3000));
      send_expect(w, (w > 40'd1000) && (w < 40'd2000));
    end
    roi_enable = 1'b0;

    // word arriving while RXNE pending is dropped
    held = 40'h12_3456_789A;
    send_word(held);
    repeat (3) @(negedge rclk);
    check(rxne && dr == held, "first word pending");
    send_word(40'h55_5555_5555);
    repeat (3) @(negedge rclk);
    check(rxne && dr == held, "second word dropped, DR unchanged");
    do_ack();
    send_expect(40'h0A_0B0C_0D0E, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge rclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
