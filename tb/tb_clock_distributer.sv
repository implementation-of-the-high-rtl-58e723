// Testbench for clock_distributer: measures the period of both divided
// clocks in input clocks (expected 2*(DIV+1): 30 for the 10 MHz system
// clock, 162 for the 16x baud clock) and their duty cycle, at the default
// divide factors, and checks that reset holds both outputs low.
`timescale 1ns/1ps
module tb_clock_distributer;
  logic clk_in = 1'b0, rst = 1'b1;
  logic clk_sys, clk_uart;
  int   checks = 0, failures = 0;

  clock_distributer dut (.clk_in, .rst, .clk_sys, .clk_uart);

  always #1.667 clk_in = ~clk_in;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // count input clocks between rising edges and high time of a clock
  task automatic measure(input bit which, output int period, output int high);
    int n = 0, h = 0;
    logic prev;
    // align to a rising edge
    prev = which ? clk_uart : clk_sys;
    forever begin
      @(posedge clk_in); #0.1;
      if ((which ? clk_uart : clk_sys) && !prev) break;
      prev = which ? clk_uart : clk_sys;
    end
    prev = 1'b1;
    forever begin
      @(posedge clk_in); #0.1;
      n++;
      if (prev) h++;
      if ((which ? clk_uart : clk_sys) && !prev) break;
      prev = which ? clk_uart : clk_sys;
    end
    period = n; high = h;
  endtask

  initial begin
    int p, h;
    repeat (5) @(posedge clk_in);
    #0.1;
    check(clk_sys == 1'b0 && clk_uart == 1'b0, "outputs low in reset");
    rst = 1'b0;
    for (int i = 0; i < 3; i++) begin
      measure(1'b0, p, h);
      check(p == 30, $sformatf("system clock period %0d, expected 30", p));
      check(h == 15, $sformatf("system clock high time %0d, expected 15", h));
      measure(1'b1, p, h);
      check(p == 162, $sformatf("uart clock period %0d, expected 162", p));
      check(h == 81, $sformatf("uart clock high time %0d, expected 81", h));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_in);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
