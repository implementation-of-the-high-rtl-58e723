// Testbench for pwm_generator at its defaults (period 255 clocks of the
// 24 MHz clock = 94.1 kHz). For several compare values it counts the high
// clocks in each whole period (expected = compare) and measures the period
// between rising edges (expected 255).
`timescale 1ns/1ps
module tb_pwm_generator;
  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] compare = '0;
  logic       pwm;
  int         checks = 0, failures = 0;

  pwm_generator dut (.*);

  always #20.833 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // count high clocks over one period aligned to the period start
  task automatic measure(input logic [7:0] c);
    int high;
    @(negedge clk) compare = c;
    // let the value be taken at a period start, then align to the next
    wait (dut.cnt == 8'd254); @(negedge clk);
    wait (dut.cnt == 8'd254); @(negedge clk);
    high = 0;
    for (int i = 0; i < 255; i++) begin
      @(posedge clk); #1;
      if (pwm) high++;
    end
    check(high == int'(c), $sformatf("compare %0d: %0d high clocks", c, high));
  endtask

  initial begin
    int t0, t1, n;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    measure(8'd0);
    measure(8'd1);
    measure(8'd128);
    measure(8'd200);
    measure(8'd254);
    measure(8'd255);
    for (int i = 0; i < 5; i++) measure(8'($urandom_range(1, 254)));
    // period between rising edges
    compare = 8'd100;
    @(posedge pwm);
    n = 0;
    fork
      begin @(posedge pwm); end
      forever begin @(posedge clk); n++; end
    join_any
    disable fork;
    check(n == 255, $sformatf("period %0d clocks, expected 255", n));
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
