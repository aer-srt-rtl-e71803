// Self-checking test of aer_tx as node 4. Input and Bypass FIFOs are
// modelled by queues with the head visible; the link accepts words at
// random (tx_tready). The test checks the exact order of the non-IDLE
// words sent over two emulation cycles: SYNCs queued during the execution
// phase are held until the node's own SYNC, START waits for aer_on, the
// node's events go out before any bypass traffic, and SYNCs of the next
// cycle are held after aer_done.
module tb_aer_tx;
  import aer_srt_pkg::*;
  logic clk = 0, rst_n = 0, eo_exec = 0, aer_on = 0, aer_done = 0, tx_tready = 1;
  chip_id_t chip_id = 7'd4;
  logic in_empty = 1, byp_empty = 1, in_rd, byp_rd, tx_tvalid, bypass_mode;
  addr_t in_rdata = '0;
  pkt_t byp_rdata = '0, tx_tdata;
  int checks = 0, failures = 0, stalls = 0, bypass_cycles = 0;
  addr_t inq[$];
  pkt_t bq[$], got[$], exp_q[$];
  bit start_before_on = 0;

  aer_tx dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  function automatic void refresh();
    in_empty  = (inq.size() == 0);
    in_rdata  = in_empty ? '0 : inq[0];
    byp_empty = (bq.size() == 0);
    byp_rdata = byp_empty ? '0 : bq[0];
  endfunction

  always @(posedge clk) if (rst_n) begin
    bit pi, pb;
    pi = in_rd; pb = byp_rd;
    if (tx_tvalid && tx_tready && tx_tdata != mk_ctrl(CTRL_IDLE, chip_id)) begin
      got.push_back(tx_tdata);
      if (tx_tdata == mk_ctrl(CTRL_START, chip_id) && !aer_on) start_before_on = 1;
    end
    if (!tx_tready) stalls++;
    if (bypass_mode) bypass_cycles++;
    #1;
    if (pi) void'(inq.pop_front());
    if (pb) void'(bq.pop_front());
    refresh();
    tx_tready = ($urandom_range(0, 4) != 0);
  end

  task automatic wait_cycles(int n); repeat (n) @(posedge clk); #2; endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #2 rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      // execution phase: own events queued, a SYNC from node 1 arrives
      for (int i = 0; i < 7; i++) inq.push_back(addr_t'(100 * rep + i));
      if (rep == 0) bq.push_back(mk_ctrl(CTRL_SYNC, 1));
      refresh();
      wait_cycles(10);
      check(got.size() == exp_q.size(), "nothing but IDLE during EP");
      exp_q.push_back(mk_ctrl(CTRL_SYNC, 4));
      exp_q.push_back(mk_ctrl(CTRL_SYNC, rep == 0 ? 1 : 9));
      eo_exec = 1; @(posedge clk); #2; eo_exec = 0;
      wait_cycles(10);
      bq.push_back(mk_ctrl(CTRL_SYNC, 2)); refresh();
      exp_q.push_back(mk_ctrl(CTRL_SYNC, 2));
      wait_cycles(10);
      aer_on = 1;
      exp_q.push_back(mk_ctrl(CTRL_START, 4));
      foreach (inq[i]) exp_q.push_back(mk_data(inq[i]));
      exp_q.push_back(mk_ctrl(CTRL_FINISH, 4));
      // upstream traffic arrives while own events are sent
      bq.push_back(mk_ctrl(CTRL_START, 1));
      for (int i = 0; i < 5; i++) bq.push_back(mk_data(addr_t'(500 + i)));
      bq.push_back(mk_ctrl(CTRL_FINISH, 1));
      refresh();
      foreach (bq[i]) exp_q.push_back(bq[i]);
      wait_cycles(40);
      check(bypass_mode, "bypass mode after FINISH");
      aer_on = 0; aer_done = 1;
      bq.push_back(mk_ctrl(CTRL_SYNC, 9)); refresh();   // next cycle's SYNC: held
      wait_cycles(20);
      check(!bypass_mode, "back to IDLE after aer_done");
      check(bq.size() == 1, "next-cycle SYNC held");
      check(got.size() == exp_q.size(), $sformatf("words sent %0d exp %0d", got.size(), exp_q.size()));
      aer_done = 0;
    end
    foreach (exp_q[i]) if (i < got.size()) check(got[i] == exp_q[i], $sformatf("word %0d: %h exp %h", i, got[i], exp_q[i]));
    check(!start_before_on, "START only after aer_on");
    check(stalls > 0 && bypass_cycles > 0, "stalls and bypass exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
