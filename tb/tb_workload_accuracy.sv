// Accuracy workload on the synchronous reading block at its full size
// (65536-word FIFO, no parameter overrides). The accuracy test records
// 50 000 time stamps of one fixed interval and fits their spread. Here a
// TMU model posts 50 000 stamps around a fixed interval with a roughly
// Gaussian spread of one LSB (sum of four 0/1 draws, variance 4 x 1/4), as fast as
// the handshake allows; sync_read_fb records them all and uploads them.
// Checks: every stamp comes back, in order and unchanged, as a 5-byte
// word, and the mean and spread computed from the upload equal those of
// the stamps that were sent.
`timescale 1ns/1ps
module tb_workload_accuracy;
  import tdc_pkg::*;
  localparam int unsigned N    = 50000;
  localparam longint     MEAN = 40'h00_0001_E240;   // fixed interval in LSB

  logic         clk = 1'b0, rst = 1'b0, start = 1'b0;
  logic         busy, ack, rxne = 1'b0, tx_busy = 1'b0;
  logic [31:0]  param = '0;
  sample_t      dr = '0;
  tx_req_t      tx;
  int           checks = 0, failures = 0;
  sample_t      sent [$];
  sample_t      txq [$];
  bit           feeding = 1'b0;

  sync_read_fb dut (.*);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    forever begin
      @(negedge clk);
      if (feeding && sent.size() < N) begin
        dr = MEAN + sample_t'($urandom_range(0, 1) + $urandom_range(0, 1)
                             + $urandom_range(0, 1) + $urandom_range(0, 1)) - 40'd2;
        sent.push_back(dr);
        rxne = 1'b1;
        while (!ack) @(negedge clk);
        rxne = 1'b0;
        while (ack) @(negedge clk);
      end
    end
  end

  initial begin
    forever begin
      @(negedge clk);
      if (tx.start) begin
        tx_busy = 1'b1;
        check(tx.num == 3'd5, "5-byte word");
        txq.push_back(tx.data);
        while (tx.start) @(negedge clk);
        tx_busy = 1'b0;
      end
    end
  end

  function automatic void stats(input sample_t q [$], output real mean, output real sd);
    real s = 0.0, s2 = 0.0;
    foreach (q[i]) s += real'(longint'(q[i]) - MEAN);
    mean = s / q.size();
    foreach (q[i]) s2 += (real'(longint'(q[i]) - MEAN) - mean) ** 2;
    sd = $sqrt(s2 / q.size());
  endfunction

  initial begin
    int bad;
    real m_in, sd_in, m_out, sd_out;
    #1 rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    param = N;
    feeding = 1'b1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    while (busy) @(negedge clk);
    check(sent.size() == N && txq.size() == N, $sformatf("%0d sent, %0d uploaded", sent.size(), txq.size()));
    bad = 0;
    for (int i = 0; i < N && i < txq.size(); i++) if (txq[i] != sent[i]) bad++;
    check(bad == 0, $sformatf("%0d uploaded stamps differ", bad));
    stats(sent, m_in, sd_in);
    stats(txq, m_out, sd_out);
    $display("accuracy: %0d stamps, mean offset %f LSB, sigma %f LSB (sent: %f, %f)", txq.size(), m_out, sd_out, m_in, sd_in);
    check(m_in == m_out && sd_in == sd_out, "statistics preserved");
    check(sd_out > 0.95 && sd_out < 1.05, "spread of one LSB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
