// Testbench for async_read_fb. A decoder model posts samples with the
// RXNE/ACK four-phase handshake, faster than the serial-port model can
// send them (each 5-byte word keeps the port busy for 60 clocks). Checks:
// exactly param words are sent, each is a posted sample, in posting order,
// every sample is either sent or discarded (discards do happen), each
// request is 5 bytes, and busy follows the Start/Busy protocol.
`timescale 1ns/1ps
module tb_async_read_fb;
  import tdc_pkg::*;
  logic         clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic         busy, ack, rxne = 1'b0, tx_busy = 1'b0, discarded;
  logic [31:0]  param = '0;
  sample_t      dr = '0;
  tx_req_t      tx;
  int           checks = 0, failures = 0;
  sample_t      posted [$], sent [$];
  int           n_acked = 0, n_discarded = 0;
  bit           feed = 1'b0;

  async_read_fb dut (.*);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // decoder model: one new sample every 8 clocks while feed is set
  initial begin
    forever begin
      @(negedge clk);
      if (feed) begin
        dr   = {$urandom(), $urandom()};
        rxne = 1'b1;
        posted.push_back(dr);
        while (!ack) @(negedge clk);
        n_acked++;
        repeat (2) @(negedge clk);
        rxne = 1'b0;
        while (ack) @(negedge clk);
        repeat (3) @(negedge clk);
      end
    end
  end

  // serial port model
  initial begin
    forever begin
      @(negedge clk);
      if (tx.start) begin
        repeat (2) @(negedge clk);
        tx_busy = 1'b1;
        check(tx.num == 3'd5, "5-byte request");
        sent.push_back(tx.data);
        while (tx.start) @(negedge clk);
        repeat (60) @(negedge clk);
        tx_busy = 1'b0;
      end
    end
  end

  always @(posedge clk) if (discarded) n_discarded++;

  task automatic run(input int n);
    int idx;
    posted.delete(); sent.delete();
    if (rxne) posted.push_back(dr);   // sample left pending by the last run
    n_acked = 0; n_discarded = 0;
    @(negedge clk);
    param = n; start = 1'b1;
    @(negedge clk);
    check(busy, "busy the clock after start");
    start = 1'b0;
    feed  = 1'b1;
    while (busy) @(negedge clk);
    feed = 1'b0;
    repeat (20) @(negedge clk);
    check(sent.size() == n, $sformatf("%0d words sent, expected %0d", sent.size(), n));
    check(n_acked == sent.size() + n_discarded,
          $sformatf("acked %0d = sent %0d + discarded %0d", n_acked, sent.size(), n_discarded));
    check(n_discarded > 0, "samples were discarded while the port was busy");
    idx = 0;
    for (int i = 0; i < sent.size(); i++) begin
      bit found = 1'b0;
      for (int j = idx; j < posted.size(); j++) begin
        if (!found && posted[j] == sent[i]) begin
          found = 1'b1;
          idx   = j + 1;
        end
      end
      check(found, $sformatf("sent word %0d is a posted sample, in order", i));
    end
    check(sent.size() > 0 && posted.size() > 0 && sent[0] == posted[0], "first sample is sent");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    check(!busy && !ack && !tx.start, "idle after reset");
    run(5);
    run(12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
