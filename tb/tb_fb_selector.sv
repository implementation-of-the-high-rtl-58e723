// Testbench for fb_selector: for each task code and every combination of
// start, busy and ack inputs, only the selected block is started and its
// busy and ack are returned; task 4 starts the histogram upload and uses
// the histogram block's busy; unknown tasks start nothing.
`timescale 1ns/1ps
module tb_fb_selector;
  import tdc_pkg::*;
  task_e task_sel;
  logic  start, busy, ack;
  logic  start_async, start_hist, start_upload, start_sync;
  logic  busy_async, busy_hist, busy_sync, ack_async, ack_hist, ack_sync;
  int    checks = 0, failures = 0;

  fb_selector dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int t = 0; t < 8; t++) begin
      for (int v = 0; v < 128; v++) begin
        logic [3:0] exp_start;
        logic       exp_busy, exp_ack;
        task_sel = task_e'(t);
        {start, busy_async, busy_hist, busy_sync, ack_async, ack_hist, ack_sync} = 7'(v);
        #1;
        exp_start = '0; exp_busy = 1'b0; exp_ack = 1'b0;
        case (t)
          1: begin exp_start[0] = start; exp_busy = busy_async; exp_ack = ack_async; end
          2: begin exp_start[1] = start; exp_busy = busy_hist;  exp_ack = ack_hist;  end
          3: begin exp_start[3] = start; exp_busy = busy_sync;  exp_ack = ack_sync;  end
          4: begin exp_start[2] = start; exp_busy = busy_hist;  exp_ack = 1'b0;      end
          default: ;
        endcase
        check({start_sync, start_upload, start_hist, start_async} == exp_start,
              $sformatf("task %0d starts", t));
        check(busy == exp_busy && ack == exp_ack, $sformatf("task %0d busy/ack", t));
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
