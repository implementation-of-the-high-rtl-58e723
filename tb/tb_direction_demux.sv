// Testbench for direction_demux: all four input combinations against the
// de-multiplexer truth table (unselected output low).
`timescale 1ns/1ps
module tb_direction_demux;
  logic       sel, din;
  logic [1:0] dout;
  int         checks = 0, failures = 0;

  direction_demux dut (.*);

  initial begin
    // {sel, din} -> {dout[1], dout[0]}
    logic [1:0] expect_tab [4] = '{2'b00, 2'b01, 2'b00, 2'b10};
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 4; i++) begin
        {sel, din} = 2'(i);
        #1;
        checks++;
        if (dout != expect_tab[i]) begin
          failures++;
          $display("FAIL: sel=%0d din=%0d dout=%b", sel, din, dout);
        end
      end
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
