// Testbench for spi_master (mode 0, LSB first, 16-bit). A slave model
// samples MOSI on each rising SCLK edge and changes MISO on each falling
// edge, LSB first, as the CDCE62002 does. Checks: the word the slave
// receives, the word the master receives, 16 rising edges per transfer,
// SCLK idle low, an SCLK period of 2*CLK_DIV clocks, busy/done behaviour.
// Select: ss low at every SCLK edge of a transfer, high again after a
// single word, and held low across two chained words that form one 32-bit
// register frame (low half first), which the slave then sees as 32 bits
// within a single ss-low window.
`timescale 1ns/1ps
module tb_spi_master;
  localparam int unsigned CLK_DIV = 4;
  logic        clk = 1'b0, rst = 1'b1;
  logic [15:0] tx_data = '0, rx_data;
  logic        tx_valid = 1'b0, done, busy, sclk, mosi, ss, miso;
  int          checks = 0, failures = 0;

  // slave model state
  logic [15:0] slave_rx, slave_tx;
  int          slave_bits;
  int          last_rise, period;
  logic [31:0] frame;
  int          frame_bits = 0, ss_rises = 0, ss_bad = 0;

  spi_master #(.WORD_W(16), .CLK_DIV(CLK_DIV)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge sclk) begin
    slave_rx = {mosi, slave_rx[15:1]};
    frame    = {mosi, frame[31:1]};
    frame_bits++;
    if (ss) ss_bad++;
    slave_bits++;
    if (last_rise >= 0) period = cyc - last_rise;
    last_rise = cyc;
  end
  always @(negedge sclk) begin
    slave_tx = {1'b0, slave_tx[15:1]};
    miso     = slave_tx[0];
  end

  always @(posedge ss) ss_rises++;
  always @(negedge ss) frame_bits = 0;

  task automatic transfer(input logic [15:0] m, input logic [15:0] s);
    slave_tx   = s;
    miso       = s[0];
    slave_bits = 0;
    last_rise  = -1;
    @(negedge clk);
    tx_data = m; tx_valid = 1'b1;
    @(negedge clk);
    tx_valid = 1'b0;
    check(busy && !done, "busy during transfer");
    while (busy) @(negedge clk);
    check(done, "done set after transfer");
    check(slave_bits == 16, $sformatf("%0d SCLK rising edges", slave_bits));
    check(slave_rx == m, $sformatf("slave got %h, expected %h", slave_rx, m));
    check(rx_data == s, $sformatf("master got %h, expected %h", rx_data, s));
    check(period == 2 * CLK_DIV, $sformatf("SCLK period %0d clocks", period));
    check(sclk == 1'b0, "SCLK idles low");
    @(negedge clk);
    check(ss, "ss high after a single word");
    repeat (5) @(negedge clk);
  endtask

  initial begin
    logic [31:0] reg_word;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    check(!busy && !sclk, "idle after reset");
    transfer(16'h0001, 16'h8000);
    transfer(16'hA5C3, 16'h3C5A);
    for (int i = 0; i < 10; i++) transfer(16'($urandom()), 16'($urandom()));
    // 32-bit register write as two transfers, low half first
    reg_word = 32'h8400_0C0E;
    transfer(reg_word[15:0], 16'h0);
    transfer(reg_word[31:16], 16'h0);
    // the same register as one chained frame
    begin
      int rises0;
      rises0 = ss_rises;
      reg_word = 32'h1234_ABCD;
      @(negedge clk);
      tx_data = reg_word[15:0]; tx_valid = 1'b1;
      @(negedge clk);
      tx_valid = 1'b0;
      while (busy) @(negedge clk);
      tx_data = reg_word[31:16]; tx_valid = 1'b1;
      @(negedge clk);
      tx_valid = 1'b0;
      check(busy && !ss, "second word chained with ss low");
      while (busy) @(negedge clk);
      @(negedge clk);
      check(ss, "ss high after the frame");
      check(ss_rises == rises0 + 1, "one ss pulse for the 32-bit frame");
      check(frame_bits == 32 && frame == reg_word,
            $sformatf("frame %0d bits %h, expected %h", frame_bits, frame, reg_word));
    end
    check(ss_bad == 0, $sformatf("%0d SCLK edges with ss high", ss_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
