// Testbench for loop_timer at its defaults: the terminal-count flag must
// set every 24 x 20000 = 480000 clocks of the 24 MHz clock (20 ms), stay
// set until cleared, and a clear must not lose the next terminal count.
`timescale 1ns/1ps
module tb_loop_timer;
  logic clk = 1'b0, rst = 1'b1, tc_clear = 1'b0, tc;
  int   checks = 0, failures = 0;
  longint cyc = 0;

  loop_timer dut (.*);

  always #20.833 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    longint t_prev, t_now;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    t_prev = cyc;
    check(!tc, "flag clear after reset");
    for (int i = 0; i < 4; i++) begin
      wait (tc);
      t_now = cyc;
      check(t_now - t_prev == 480000, $sformatf("interval %0d clocks, expected 480000", t_now - t_prev));
      t_prev = t_now;
      // the flag is sticky
      repeat (1000) @(negedge clk);
      check(tc, "flag stays set until cleared");
      @(negedge clk) tc_clear = 1'b1;
      @(negedge clk) tc_clear = 1'b0;
      check(!tc, "flag cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
