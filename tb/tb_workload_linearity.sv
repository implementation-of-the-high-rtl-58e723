// Linearity workload on the histogram block at its full size (65536 bins
// of 16-bit counts, no parameter overrides). The measurement method: two
// generators with nearly equal frequencies make the measured interval
// grow by half an LSB per sample, a slow ramp that visits every code in
// turn. An ideal converter then puts exactly two samples in every bin. The
// testbench plays such a ramp (2 x 65536 samples, starting at an arbitrary
// 40-bit offset so the low 16 bits wrap once) into histogram_fb, uploads
// all bins and checks that every bin holds 2, i.e. a DNL of zero for an
// ideal input, and that the finished message and 65536 two-byte uploads
// appear. The real test used about 10 000 samples per bin; the count per
// bin is reduced here to keep the run short, the bin count is not.
`timescale 1ns/1ps
module tb_workload_linearity;
  import tdc_pkg::*;
  localparam int unsigned BINS      = 65536;
  localparam int unsigned PER_BIN   = 2;
  localparam longint     OFFSET    = 40'h3A_0000_C350;

  logic         clk = 1'b0, rst = 1'b0, start = 1'b0, start_upload = 1'b0;
  logic         busy, ack, rxne = 1'b0, tx_busy = 1'b0;
  logic [31:0]  param = '0;
  sample_t      dr = '0;
  tx_req_t      tx;
  int           checks = 0, failures = 0;
  sample_t      txq [$];
  int           fed = 0;
  bit           feeding = 1'b0;

  histogram_fb dut (.*);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // decoder model: the ramp, sample k = OFFSET + k/2
  initial begin
    forever begin
      @(negedge clk);
      if (feeding && fed < PER_BIN * BINS) begin
        dr   = OFFSET + sample_t'(fed / 2);
        rxne = 1'b1;
        while (!ack) @(negedge clk);
        rxne = 1'b0;
        fed++;
        while (ack) @(negedge clk);
      end
    end
  end

  // serial port model, one clock of busy per request
  initial begin
    forever begin
      @(negedge clk);
      if (tx.start) begin
        tx_busy = 1'b1;
        txq.push_back(tx.data);
        while (tx.start) @(negedge clk);
        tx_busy = 1'b0;
      end
    end
  end

  initial begin
    int bad;
    #1 rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    while (busy) @(negedge clk);
    // generation
    param = PER_BIN * BINS;
    feeding = 1'b1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) @(negedge clk);
    check(fed == PER_BIN * BINS, $sformatf("%0d ramp samples taken", fed));
    check(txq.size() == 1 && txq[0][39:32] == HIST_DONE, "finished message");
    txq.delete();
    // upload
    start_upload = 1'b1;
    @(negedge clk);
    start_upload = 1'b0;
    while (busy) @(negedge clk);
    check(txq.size() == BINS, $sformatf("%0d bins uploaded", txq.size()));
    bad = 0;
    foreach (txq[b]) begin
      checks++;
      if (txq[b][39:24] != 16'(PER_BIN)) begin
        bad++;
        failures++;
        if (bad < 10) $display("FAIL: bin %0d = %0d", b, txq[b][39:24]);
      end
    end
    $display("linearity: %0d bins, %0d samples, %0d bins off the ideal count", BINS, fed, bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
