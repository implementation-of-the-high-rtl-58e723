// Testbench for sync_read_fb with a 16-deep FIFO. The decoder model posts
// samples back to back; the serial-port model is slow. Checks: no word is
// sent before all param samples are captured, every sample is captured
// (none lost), the upload returns them in order as 5-byte words, a full
// FIFO (param = DEPTH) works, and param above DEPTH ends without output.
`timescale 1ns/1ps
module tb_sync_read_fb;
  import tdc_pkg::*;
  localparam int unsigned DEPTH = 16;
  logic         clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic         busy, ack, rxne = 1'b0, tx_busy = 1'b0;
  logic [31:0]  param = '0;
  sample_t      dr = '0;
  tx_req_t      tx;
  int           checks = 0, failures = 0;
  sample_t      feedq [$], posted [$], txq [$];
  int           n_taken_at_first_tx;

  sync_read_fb #(.DEPTH(DEPTH)) dut (.*);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    forever begin
      @(negedge clk);
      if (feedq.size() > 0) begin
        dr   = feedq.pop_front();
        rxne = 1'b1;
        while (!ack) @(negedge clk);
        posted.push_back(dr);
        rxne = 1'b0;
        while (ack) @(negedge clk);
      end
    end
  end

  initial begin
    forever begin
      @(negedge clk);
      if (tx.start) begin
        if (txq.size() == 0) n_taken_at_first_tx = posted.size();
        @(negedge clk);
        tx_busy = 1'b1;
        check(tx.num == 3'd5, "5-byte request");
        txq.push_back(tx.data);
        while (tx.start) @(negedge clk);
        repeat (20) @(negedge clk);
        tx_busy = 1'b0;
      end
    end
  end

  task automatic run(input int n, input int expect_n);
    txq.delete(); posted.delete(); feedq.delete();
    n_taken_at_first_tx = -1;
    for (int i = 0; i < n + 3; i++) feedq.push_back({$urandom(), $urandom()});
    @(negedge clk);
    param = n; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    while (busy) @(negedge clk);
    check(txq.size() == expect_n, $sformatf("%0d words uploaded, expected %0d", txq.size(), expect_n));
    if (expect_n > 0) begin
      check(n_taken_at_first_tx == n, $sformatf("upload starts after capture (%0d taken)", n_taken_at_first_tx));
      foreach (txq[i]) check(i < posted.size() && txq[i] == posted[i], $sformatf("word %0d in order", i));
    end
    feedq.delete();
    repeat (10) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    check(!busy, "idle after reset");
    run(10, 10);
    run(DEPTH, DEPTH);
    run(1, 1);
    run(DEPTH + 1, 0);
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
