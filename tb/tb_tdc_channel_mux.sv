// Testbench for tdc_channel_mux: for every select value and random
// decoder outputs, the selected channel's DR and RXNE come out and ACK
// reaches only the selected channel.
`timescale 1ns/1ps
module tb_tdc_channel_mux;
  import tdc_pkg::*;
  logic [1:0] sel;
  sample_t    dr_in [4];
  logic [3:0] rxne_in, ack_out;
  logic       ack_in, rxne;
  sample_t    dr;
  int         checks = 0, failures = 0;

  tdc_channel_mux dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int r = 0; r < 50; r++) begin
      for (int c = 0; c < 4; c++) dr_in[c] = {$urandom(), $urandom()};
      rxne_in = 4'($urandom());
      ack_in  = 1'($urandom());
      sel     = 2'(r % 4);
      #1;
      check(dr == dr_in[r % 4], "DR of the selected channel");
      check(rxne == rxne_in[r % 4], "RXNE of the selected channel");
      check(ack_out == (ack_in ? (4'b1 << (r % 4)) : 4'b0), "ACK only to the selected channel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
