// Testbench for supervisor. The RS-232 interface is modelled at its
// request level (Start/Busy, bytes placed in the upper bytes of the word)
// with a queue of bytes from the host and a list of bytes sent back; a
// function-block model answers fb_start with a busy period. Checks the
// instruction protocol: 0x1F -> 0xFF; 0xAA -> 0xAA, echo of the 5-byte
// word, 0xFF runs the function with the right task, channel, parameter
// and serial-port owner; any other confirmation byte runs nothing; illegal
// identifiers and parameters answer five zero bytes; 0xBB with the ROI
// bounds (three echoed words, ROI enabled), lower > upper is an error;
// unknown first bytes are ignored.
`timescale 1ns/1ps
module tb_supervisor;
  import tdc_pkg::*;
  logic               clk = 1'b0, rst = 1'b1;
  logic               rx_start, rx_busy = 1'b0, tx_busy = 1'b0;
  logic [2:0]         rx_num;
  sample_t            rx_data = '0;
  tx_req_t            tx;
  logic               fb_start, fb_busy = 1'b0, roi_enable, instr_error;
  task_e              task_sel;
  logic [1:0]         ch_sel;
  owner_e             owner;
  logic [PARAM_W-1:0] param;
  sample_t            roi_lower, roi_upper;
  int                 checks = 0, failures = 0;

  logic [7:0] host_q [$], reply_q [$];
  int         n_runs = 0;
  task_e      run_task;
  logic [1:0] run_ch;
  logic [31:0] run_param;
  logic       run_roi;
  sample_t    run_lo, run_hi;
  owner_e     run_owner;

  supervisor dut (.*);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // serial interface model, receive side
  initial begin
    forever begin
      @(negedge clk);
      if (rx_start) begin
        int n;
        n = rx_num;
        repeat (2) @(negedge clk);
        rx_busy = 1'b1;
        while (rx_start) @(negedge clk);
        rx_data = '0;
        for (int i = 5 - n; i < 5; i++) begin
          while (host_q.size() == 0) @(negedge clk);
          rx_data[i*8 +: 8] = host_q.pop_front();
        end
        repeat (2) @(negedge clk);
        rx_busy = 1'b0;
      end
    end
  end

  // serial interface model, transmit side
  initial begin
    forever begin
      @(negedge clk);
      if (tx.start) begin
        repeat (2) @(negedge clk);
        tx_busy = 1'b1;
        for (int i = 5 - int'(tx.num); i < 5; i++) reply_q.push_back(tx.data[i*8 +: 8]);
        while (tx.start) @(negedge clk);
        repeat (5) @(negedge clk);
        tx_busy = 1'b0;
      end
    end
  end

  // function block model
  initial begin
    forever begin
      @(negedge clk);
      if (fb_start) begin
        n_runs++;
        run_task = task_sel; run_ch = ch_sel; run_param = param;
        run_roi = roi_enable; run_lo = roi_lower; run_hi = roi_upper; run_owner = owner;
        repeat (2) @(negedge clk);
        fb_busy = 1'b1;
        while (fb_start) @(negedge clk);
        repeat (20) @(negedge clk);
        fb_busy = 1'b0;
      end
    end
  end

  task automatic push_word(input sample_t w);
    for (int i = 0; i < 5; i++) host_q.push_back(w[i*8 +: 8]);
  endtask

  function automatic sample_t id_word(input logic [3:0] ch, input logic [3:0] t, input logic [31:0] p);
    return {p, ch, t};
  endfunction

  // wait until the supervisor has consumed the host bytes and is idle
  task automatic settle();
    int quiet = 0;
    while (quiet < 60) begin
      @(negedge clk);
      if (host_q.size() == 0 && !fb_busy && !tx_busy && !tx.start) quiet++; else quiet = 0;
    end
  endtask

  task automatic expect_reply(input logic [7:0] exp [], input string what);
    check(reply_q.size() == exp.size(), $sformatf("%s: %0d reply bytes, expected %0d", what, reply_q.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < reply_q.size(); i++)
      check(reply_q[i] == exp[i], $sformatf("%s: reply byte %0d = %h, expected %h", what, i, reply_q[i], exp[i]));
    reply_q.delete();
  endtask

  // parameter upload without ROI, then confirmation byte
  task automatic param_cmd(input sample_t w, input bit legal, input logic [7:0] conf, input string what);
    logic [7:0] exp [];
    int runs0 = n_runs;
    host_q.push_back(CMD_PARAM);
    push_word(w);
    if (legal) host_q.push_back(conf);
    settle();
    exp = new[6];
    exp[0] = CMD_PARAM;
    for (int i = 0; i < 5; i++) exp[i+1] = legal ? w[i*8 +: 8] : 8'h00;
    expect_reply(exp, what);
    check(n_runs == runs0 + ((legal && conf == CONFIRM) ? 1 : 0), $sformatf("%s: runs", what));
    check(instr_error_seen == !legal, $sformatf("%s: error flag", what));
    instr_error_seen = 1'b0;
  endtask

  bit instr_error_seen = 1'b0;
  always @(posedge clk) if (instr_error) instr_error_seen = 1'b1;

  initial begin
    logic [7:0] exp [];
    sample_t lo, hi, w;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // synchronisation
    host_q.push_back(CMD_SYNC);
    settle();
    expect_reply('{8'hFF}, "sync");

    // histogram on channel 2, 1000 samples
    w = id_word(4'd2, 4'd2, 32'd1000);
    param_cmd(w, 1'b1, CONFIRM, "hist ch2");
    check(run_task == TASK_HIST && run_ch == 2'd2 && run_param == 32'd1000 && !run_roi && run_owner == OWN_HIST,
          "hist ch2 settings");
    check(owner == OWN_SUPERVISOR, "port back to the supervisor");

    // synchronous sampling limits
    param_cmd(id_word(4'd1, 4'd3, 32'd65536), 1'b1, CONFIRM, "sync 65536");
    check(run_task == TASK_SYNC && run_ch == 2'd1 && run_param == 32'd65536 && run_owner == OWN_SYNC, "sync settings");
    param_cmd(id_word(4'd1, 4'd3, 32'd65537), 1'b0, CONFIRM, "sync 65537");
    param_cmd(id_word(4'd0, 4'd1, 32'd0), 1'b0, CONFIRM, "parameter 0");
    param_cmd(id_word(4'd5, 4'd1, 32'd10), 1'b0, CONFIRM, "channel 5");
    param_cmd(id_word(4'd0, 4'd7, 32'd10), 1'b0, CONFIRM, "task 7");
    // not confirmed
    param_cmd(id_word(4'd3, 4'd1, 32'd10), 1'b1, 8'h00, "not confirmed");
    // asynchronous sampling, large parameter, and upload
    param_cmd(id_word(4'd3, 4'd1, 32'hFFFF_FFFF), 1'b1, CONFIRM, "async ch3");
    check(run_task == TASK_ASYNC && run_ch == 2'd3 && run_param == 32'hFFFF_FFFF && run_owner == OWN_ASYNC, "async settings");
    param_cmd(id_word(4'd0, 4'd4, 32'd0), 1'b1, CONFIRM, "upload");
    check(run_task == TASK_UPLOAD && run_owner == OWN_HIST, "upload settings");

    // ROI variant
    lo = 40'h00_0000_0100; hi = 40'h00_0000_0200;
    w  = id_word(4'd1, 4'd1, 32'd7);
    host_q.push_back(CMD_PARAM_ROI);
    push_word(w); push_word(lo); push_word(hi);
    host_q.push_back(CONFIRM);
    settle();
    exp = new[16];
    exp[0] = CMD_PARAM_ROI;
    for (int i = 0; i < 5; i++) begin
      exp[1+i] = w[i*8 +: 8]; exp[6+i] = lo[i*8 +: 8]; exp[11+i] = hi[i*8 +: 8];
    end
    expect_reply(exp, "roi");
    check(run_roi && run_lo == lo && run_hi == hi && run_task == TASK_ASYNC && run_ch == 2'd1, "roi settings");

    // ROI with lower above upper
    begin
      int runs0;
      runs0 = n_runs;
      host_q.push_back(CMD_PARAM_ROI);
      push_word(w); push_word(hi); push_word(lo);
      settle();
      for (int i = 0; i < 5; i++) begin
        exp[1+i] = w[i*8 +: 8]; exp[6+i] = hi[i*8 +: 8]; exp[11+i] = 8'h00;
      end
      expect_reply(exp, "roi bad bounds");
      check(n_runs == runs0, "bad bounds not run");
    end

    // unknown byte ignored
    host_q.push_back(8'h55);
    host_q.push_back(CMD_SYNC);
    settle();
    expect_reply('{8'hFF}, "unknown then sync");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
