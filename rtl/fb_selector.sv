// Function block selector: steers the supervisor's Start to the function
// block named by the task code and returns that block's Busy and its ACK
// towards the decoders. Task 1 asynchronous sampling, 2 histogram
// generation, 3 synchronous sampling, 4 histogram upload (run by the
// histogram block). Starts of unselected blocks are held low; an unknown
// task starts nothing and reports not busy. Combinational.
module fb_selector
  import tdc_pkg::*;
(
  input  task_e task_sel,
  input  logic  start,
  output logic  busy,
  output logic  ack,
  // per block
  output logic  start_async,
  output logic  start_hist,
  output logic  start_upload,
  output logic  start_sync,
  input  logic  busy_async,
  input  logic  busy_hist,
  input  logic  busy_sync,
  input  logic  ack_async,
  input  logic  ack_hist,
  input  logic  ack_sync
);
  always_comb begin
    start_async  = 1'b0;
    start_hist   = 1'b0;
    start_upload = 1'b0;
    start_sync   = 1'b0;
    busy         = 1'b0;
    ack          = 1'b0;
    unique case (task_sel)
      TASK_ASYNC:  begin start_async  = start; busy = busy_async; ack = ack_async; end
      TASK_HIST:   begin start_hist   = start; busy = busy_hist;  ack = ack_hist;  end
      TASK_UPLOAD: begin start_upload = start; busy = busy_hist;  ack = 1'b0;      end
      TASK_SYNC:   begin start_sync   = start; busy = busy_sync;  ack = ack_sync;  end
      default: ;
    endcase
  end
endmodule
