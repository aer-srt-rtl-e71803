// Self-checking test of the network interface aer_srt_ni on its own: a
// single-node ring (Ring Size 1) whose link is a loop back through the link
// model. Over several emulation cycles the test drives events in, checks
// that every event comes back out once, in order and tagged with the node's
// Chip Id, that aer_on, aer_done and AER_eo_distrib occur once per cycle in
// that order, that the clock-compensation stall happens, and that a packet
// lost on the link is reported by the error detection.
module tb_aer_srt_ni;
  import aer_srt_pkg::*;
  localparam int NCYC = 4;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_addr = 0;
  logic [7:0] cfg_wdata = 0;
  chip_id_t chip_id;
  ring_size_t ring_size;
  logic in_valid = 0, in_ready, in_eo_exec = 0;
  addr_t in_addr = '0;
  logic out_valid, aer_eo_distrib, aer_eo_exec, aer_on, aer_done, bypass_mode;
  logic err_mismatch, err_overflow;
  logic [15:0] err_count, dp_events;
  event_t out_event;
  pkt_t tx_tdata, rx_tdata;
  logic tx_tvalid, tx_tready, rx_tvalid, do_cc, drop_next = 0;
  int cc_stall_cycles, dropped;
  int checks = 0, failures = 0;
  event_t exp_q[$];
  int n_on = 0, n_done = 0, n_dist = 0;

  aer_srt_ni #(.FIFO_DEPTH(64), .CHIP_ID_RST(0), .RING_SIZE_RST(3), .CC_PERIOD(97), .CC_LEN(4)) dut (.*);
  aurora_link_model #(.LATENCY(12)) u_link (.clk, .rst_n, .tx_tdata, .tx_tvalid, .tx_tready,
    .do_cc, .drop_next, .rx_tdata, .rx_tvalid, .cc_stall_cycles, .dropped);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      if (exp_q.size() == 0) check(0, "unexpected event");
      else begin
        check(out_event == exp_q[0], $sformatf("event %h exp %h", out_event, exp_q[0]));
        void'(exp_q.pop_front());
      end
    end
    if (aer_on && !$past(aer_on)) n_on++;
    if (aer_done && !$past(aer_done)) n_done++;
    if (aer_eo_distrib) n_dist++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    cfg_we = 1; cfg_addr = 0; cfg_wdata = 8'd42; @(posedge clk); #1;
    cfg_addr = 1; cfg_wdata = 8'd1; @(posedge clk); #1; cfg_we = 0;
    check(chip_id == 7'd42 && ring_size == 8'd1, "configuration");
    for (int c = 0; c < NCYC; c++) begin
      int n;
      n = 10 + 13 * c;
      check(in_ready, "EP open");
      for (int i = 0; i < n; i++) begin
        in_valid = 1; in_addr = addr_t'($urandom);
        exp_q.push_back({7'd42, in_addr});
        @(posedge clk); #1;
      end
      in_valid = 0;
      if (c == NCYC - 1) begin
        drop_next = 1; @(posedge clk); #1; drop_next = 0;
        void'(exp_q.pop_front());   // the first packet of this cycle is lost
      end
      in_eo_exec = 1; @(posedge clk); #1; in_eo_exec = 0;
      while (!aer_eo_distrib) begin @(posedge clk); #1; end
      check(exp_q.size() == 0, "all events returned");
      check(n_on == c + 1 && n_done == c + 1 && n_dist + int'(aer_eo_distrib) == c + 1, "one RSP/DP per cycle");
      check(dp_events == 16'(c == NCYC - 1 ? n - 1 : n), "dp_events");
      @(posedge clk); #1;
      check(err_mismatch == (c == NCYC - 1), "error flag");
      check(!err_overflow, "no overflow");
      repeat (5) @(posedge clk); #1;
    end
    check(err_count == 16'd1, "one erroneous DP");
    check(cc_stall_cycles > 0, "clock compensation stalled the link");
    check(dropped == 1, "one packet dropped by the link");
    // overflow: more events than the Input FIFO holds
    for (int i = 0; i < 70; i++) begin
      in_valid = 1; in_addr = addr_t'(i); @(posedge clk); #1;
    end
    in_valid = 0;
    check(err_overflow, "Input FIFO overflow reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
