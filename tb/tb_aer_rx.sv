// Self-checking test of aer_rx in a 3-node ring, as node 2. A packet stream
// with SYNCs, three data blocks (one of them the node's own, coming back)
// and FINISHes is sent; the test checks which packets are written into the
// Bypass FIFO, the events with their source Chip Id, the own-data strobes,
// and the exact cycles at which aer_on and aer_done change.
module tb_aer_rx;
  import aer_srt_pkg::*;
  logic clk = 0, rst_n = 0, eo_exec = 0, rx_tvalid = 0;
  chip_id_t chip_id = 7'd2, cur_src;
  ring_size_t ring_size = 8'd3;
  pkt_t rx_tdata = '0, byp_wdata;
  logic byp_wr, ev_valid, own_data, aer_on, aer_done, done_pulse;
  event_t ev_data;
  int checks = 0, failures = 0;
  pkt_t byp_got[$], byp_exp[$];
  event_t ev_got[$], ev_exp[$];
  int own_n = 0, done_n = 0;

  aer_rx dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (byp_wr) byp_got.push_back(byp_wdata);
    if (ev_valid) ev_got.push_back(ev_data);
    if (own_data) own_n++;
    if (done_pulse) done_n++;
  end

  task automatic send(pkt_t p, bit fwd);
    rx_tvalid = 1; rx_tdata = p;
    if (fwd) byp_exp.push_back(p);
    @(posedge clk); #1;
    rx_tvalid = 0;
  endtask
  task automatic block(chip_id_t src, int n);
    send(mk_ctrl(CTRL_START, src), src != chip_id);
    for (int i = 0; i < n; i++) begin
      addr_t a;
      a = addr_t'($urandom);
      ev_exp.push_back({src, a});
      send(mk_data(a), src != chip_id);
      if ($urandom_range(0, 2) == 0) send(mk_ctrl(CTRL_IDLE, 0), 0);
    end
    send(mk_ctrl(CTRL_FINISH, src), src != chip_id);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      send(mk_ctrl(CTRL_IDLE, 0), 0);
      send(mk_ctrl(CTRL_SYNC, 1), 1);
      check(!aer_on, "no aer_on after 1 SYNC");
      send(mk_ctrl(CTRL_SYNC, 3), 1);
      check(!aer_on, "no aer_on after 2 SYNC");
      send(mk_ctrl(CTRL_SYNC, 2), 0);
      check(aer_on, "aer_on right after 3rd SYNC");
      block(3, 6);
      block(1, 4);
      check(aer_on && !aer_done, "ETP running after 2 FINISH");
      block(2, 5);
      check(!aer_on && aer_done, "aer_done right after 3rd FINISH");
      check(done_n + int'(done_pulse) == rep + 1, "one done pulse");
      check(own_n == 5 * (rep + 1), "own data returned counted");
      send(mk_ctrl(CTRL_IDLE, 0), 0);
      check(aer_done, "aer_done held");
      eo_exec = 1; @(posedge clk); #1; eo_exec = 0;
      check(!aer_done, "aer_done cleared by eo_exec");
    end
    check(byp_got.size() == byp_exp.size(), $sformatf("bypass writes %0d exp %0d", byp_got.size(), byp_exp.size()));
    foreach (byp_exp[i]) if (i < byp_got.size()) check(byp_got[i] == byp_exp[i], "bypass word");
    check(ev_got.size() == ev_exp.size(), "event count");
    foreach (ev_exp[i]) if (i < ev_got.size()) check(ev_got[i] == ev_exp[i], "event value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
