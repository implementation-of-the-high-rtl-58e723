// Shared types and constants of the time-measurement firmware.
//
// A TMU result is a 40-bit word. Function blocks and the supervisor talk to
// the RS-232 transmit engine through a request bundle (start, byte count,
// 40-bit word); the byte count selects how many of the word's upper bytes
// are sent, lowest of those bytes first. The instruction codes are the ones
// the host protocol uses; the task codes follow the function-identifier
// table (task 4, histogram upload, is this design's own choice of code).
package tdc_pkg;

  localparam int unsigned SAMPLE_W = 40;  // TMU result word
  localparam int unsigned PARAM_W  = 32;  // function parameter

  typedef logic [SAMPLE_W-1:0] sample_t;

  // Transmit request to the RS-232 serial interface (Start/Busy protocol)
  typedef struct packed {
    logic       start;
    logic [2:0] num;    // 0..5 bytes, taken from bytes 5-num .. 4 of data
    sample_t    data;
  } tx_req_t;

  // Low nibble of the function identifier
  typedef enum logic [3:0] {
    TASK_NONE   = 4'd0,
    TASK_ASYNC  = 4'd1,  // asynchronous sampling
    TASK_HIST   = 4'd2,  // histogram generation
    TASK_SYNC   = 4'd3,  // synchronous sampling
    TASK_UPLOAD = 4'd4   // histogram upload
  } task_e;

  // Owner of the transmit side of the serial interface
  typedef enum logic [1:0] {
    OWN_SUPERVISOR = 2'd0,
    OWN_ASYNC      = 2'd1,
    OWN_HIST       = 2'd2,
    OWN_SYNC       = 2'd3
  } owner_e;

  localparam logic [7:0] CMD_SYNC      = 8'h1F;  // state synchronisation
  localparam logic [7:0] CMD_PARAM     = 8'hAA;  // parameter upload, ROI off
  localparam logic [7:0] CMD_PARAM_ROI = 8'hBB;  // parameter upload, ROI on
  localparam logic [7:0] REPLY_SYNC    = 8'hFF;
  localparam logic [7:0] CONFIRM       = 8'hFF;
  localparam logic [7:0] HIST_DONE     = 8'hF0;  // histogram finished message

  localparam int unsigned SYNC_MAX_SAMPLES = 65536;

endpackage
