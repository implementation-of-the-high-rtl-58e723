// Testbench for histogram_fb with a small RAM (16 bins of 4-bit counts so
// that saturation is reached). Checks: busy during the reset clear
// (2^ADDR_W clocks), the finished message (one byte 0xF0) after param
// samples, the upload of every bin (2 bytes, count in the top bits)
// against a reference histogram with saturation, the clear between two
// generations, and the two-state update (a sample every 3 clocks at most).
`timescale 1ns/1ps
module tb_histogram_fb;
  import tdc_pkg::*;
  localparam int unsigned AW = 4, CW = 4;
  logic         clk = 1'b0, rst = 1'b1, start = 1'b0, start_upload = 1'b0;
  logic         busy, ack, rxne = 1'b0, tx_busy = 1'b0;
  logic [31:0]  param = '0;
  sample_t      dr = '0;
  tx_req_t      tx;
  int           checks = 0, failures = 0;
  sample_t      txq [$];
  logic [2:0]   numq [$];
  sample_t      feedq [$];
  int           ref_hist [2**AW];

  histogram_fb #(.ADDR_W(AW), .CNT_W(CW)) dut (.*);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // decoder model: posts queued samples back to back
  initial begin
    forever begin
      @(negedge clk);
      if (feedq.size() > 0) begin
        dr   = feedq.pop_front();
        rxne = 1'b1;
        while (!ack) @(negedge clk);
        rxne = 1'b0;
        while (ack) @(negedge clk);
      end
    end
  end

  // serial port model
  initial begin
    forever begin
      @(negedge clk);
      if (tx.start) begin
        @(negedge clk);
        tx_busy = 1'b1;
        txq.push_back(tx.data);
        numq.push_back(tx.num);
        while (tx.start) @(negedge clk);
        repeat (3) @(negedge clk);
        tx_busy = 1'b0;
      end
    end
  end

  task automatic generate_hist(input int n, input int hot_bin, input int hot_n);
    sample_t s;
    foreach (ref_hist[i]) ref_hist[i] = 0;
    txq.delete(); numq.delete();
    for (int i = 0; i < n; i++) begin
      s = {$urandom(), $urandom()};
      if (i < hot_n) s[AW-1:0] = AW'(hot_bin);
      feedq.push_back(s);
      ref_hist[s[AW-1:0]]++;
    end
    @(negedge clk);
    param = n; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    while (busy) @(negedge clk);
    check(feedq.size() == 0, "all samples taken");
    check(txq.size() == 1 && numq[0] == 3'd1 && txq[0][39:32] == HIST_DONE, "finished message");
  endtask

  task automatic upload();
    int exp_c;
    txq.delete(); numq.delete();
    @(negedge clk);
    start_upload = 1'b1;
    @(negedge clk);
    start_upload = 1'b0;
    while (busy) @(negedge clk);
    check(txq.size() == 2**AW, $sformatf("%0d bins uploaded", txq.size()));
    for (int b = 0; b < 2**AW && b < txq.size(); b++) begin
      exp_c = (ref_hist[b] > 2**CW - 1) ? 2**CW - 1 : ref_hist[b];
      check(numq[b] == 3'd2, "2 bytes per bin");
      check(txq[b][39:24] == 16'(exp_c), $sformatf("bin %0d = %0d, expected %0d", b, txq[b][39:24], exp_c));
    end
  endtask

  initial begin
    int t;
    #10;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    t = 0;
    while (busy) begin @(negedge clk); t++; end
    check(t >= 2**AW && t <= 2**AW + 4, $sformatf("reset clear took %0d clocks", t));
    // after reset every bin is zero
    foreach (ref_hist[i]) ref_hist[i] = 0;
    upload();
    generate_hist(60, 5, 20);     // bin 5 gets >= 20 hits: saturates at 15
    upload();
    generate_hist(25, 9, 3);      // RAM cleared before the second run
    upload();
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
