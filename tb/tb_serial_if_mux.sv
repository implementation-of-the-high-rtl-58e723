// Testbench for serial_if_mux: for each owner, the owner's request reaches
// the serial interface and only the owner sees TX Busy.
`timescale 1ns/1ps
module tb_serial_if_mux;
  import tdc_pkg::*;
  owner_e     sel;
  tx_req_t    src_tx [4];
  tx_req_t    tx;
  logic       tx_busy;
  logic [3:0] src_busy;
  int         checks = 0, failures = 0;

  serial_if_mux dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int r = 0; r < 64; r++) begin
      for (int s = 0; s < 4; s++) begin
        src_tx[s].start = 1'($urandom());
        src_tx[s].num   = 3'($urandom());
        src_tx[s].data  = {$urandom(), $urandom()};
      end
      sel     = owner_e'(r % 4);
      tx_busy = 1'($urandom());
      #1;
      check(tx == src_tx[r % 4], "request of the owner");
      check(src_busy == (tx_busy ? (4'b1 << (r % 4)) : 4'b0), "busy only to the owner");
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
