// Scaling test of the ring: up to NMAX aer_srt_node instances at their
// default parameters, of which the first `nr` form a ring (node nr-1 feeds
// node 0; the rest idle). For each configuration the ring is reset, Chip
// Ids 1..nr and Ring Size nr are written through the configuration ports,
// and one emulation cycle with `s` spikes per node is run.
//
// Configurations: rings of 1..6 nodes with 500 and 1000 spikes per node
// (the scalability study), and a 60-node ring with 976 spikes per node,
// 58,560 events, which must be distributed within the 0.5 ms real-time
// window, 62,500 cycles at 125 MHz. Checks: every node receives every
// event, the synchronisation phase costs about 38-42 cycles per node, and
// the distribution phase stays within t = sum(s_n) + 42 N + 56 cycles.
module tb_aer_srt_scaling;
  import aer_srt_pkg::*;
  localparam int NMAX = 60;
  localparam int LAT  = 36;

  logic clk = 0, rst_n = 0;
  logic         cfg_we   [NMAX];
  logic         cfg_addr [NMAX];
  logic [7:0]   cfg_wdata[NMAX];
  logic         gen_run  [NMAX];
  logic [10:0]  gen_spikes;
  logic [15:0]  gen_exec;
  pkt_t         tx_tdata [NMAX], link_q[NMAX], node_rx[NMAX];
  logic         tx_tvalid[NMAX], tx_tready[NMAX], link_v[NMAX], node_rv[NMAX], do_cc[NMAX];
  logic         out_valid[NMAX], bypass_mode[NMAX];
  event_t       out_event[NMAX];
  logic [15:0]  own_returned[NMAX];
  node_status_t status[NMAX];
  int           cc_stall[NMAX], dropped[NMAX];
  int           nr = 1;
  int           checks = 0, failures = 0, cyc = 0;

  for (genvar k = 0; k < NMAX; k++) begin : g_n
    aer_srt_node u_node (
      .clk, .rst_n, .cfg_we(cfg_we[k]), .cfg_addr(cfg_addr[k]), .cfg_wdata(cfg_wdata[k]),
      .gen_run(gen_run[k]), .gen_spikes(gen_spikes), .gen_exec_cycles(gen_exec),
      .tx_tdata(tx_tdata[k]), .tx_tvalid(tx_tvalid[k]), .tx_tready(tx_tready[k]),
      .rx_tdata(node_rx[k]), .rx_tvalid(node_rv[k]), .do_cc(do_cc[k]),
      .out_valid(out_valid[k]), .out_event(out_event[k]), .bypass_mode(bypass_mode[k]),
      .own_returned(own_returned[k]), .status(status[k]));
    aurora_link_model #(.LATENCY(LAT)) u_link (
      .clk, .rst_n, .tx_tdata(tx_tdata[k]), .tx_tvalid(tx_tvalid[k]), .tx_tready(tx_tready[k]),
      .do_cc(do_cc[k]), .drop_next(1'b0), .rx_tdata(link_q[k]), .rx_tvalid(link_v[k]),
      .cc_stall_cycles(cc_stall[k]), .dropped(dropped[k]));
    if (k == 0) begin : g_first
      assign node_rx[0] = link_q[nr - 1];
      assign node_rv[0] = link_v[nr - 1];
    end else begin : g_next
      assign node_rx[k] = link_q[k - 1];
      assign node_rv[k] = link_v[k - 1];
    end
  end

  always #4 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int t_exec, t_on, t_dist;
  logic on_q;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (status[0].aer_eo_exec) t_exec = cyc;
      if (status[0].aer_on && !on_q) t_on = cyc;
      on_q = status[0].aer_on;
      if (status[0].aer_eo_distrib) t_dist = cyc;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_ring(int n, int s, output int rsp, output int dp);
    int total, model;
    bit all;
    nr = n;
    rst_n = 0;
    for (int k = 0; k < NMAX; k++) begin gen_run[k] = 0; cfg_we[k] = 0; end
    gen_spikes = 11'(s); gen_exec = 16'(s);
    t_exec = 0; t_on = 0; t_dist = 0; on_q = 0;
    repeat (4) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < n; k++) begin cfg_we[k] = 1; cfg_addr[k] = 0; cfg_wdata[k] = 8'(k + 1); end
    @(posedge clk); #1;
    for (int k = 0; k < n; k++) begin cfg_addr[k] = 1; cfg_wdata[k] = 8'(n); end
    @(posedge clk); #1;
    for (int k = 0; k < n; k++) begin cfg_we[k] = 0; gen_run[k] = 1; end
    do begin
      @(posedge clk); #1;
      all = 1;
      for (int k = 0; k < n; k++) if (status[k].emu_cycles == 0) all = 0;
    end while (!all);
    total = n * s;
    model = total + 42 * n + 56;
    rsp = t_on - t_exec;
    dp  = t_dist - t_exec;
    for (int k = 0; k < n; k++) begin
      check(int'(status[k].rx_events) == total, $sformatf("N=%0d s=%0d node %0d got %0d events", n, s, k + 1, status[k].rx_events));
      check(int'(own_returned[k]) == s, $sformatf("N=%0d node %0d own events back", n, k + 1));
      check(!status[k].err_mismatch && !status[k].err_overflow, $sformatf("N=%0d node %0d no error", n, k + 1));
    end
    check(dp <= model, $sformatf("N=%0d s=%0d DP %0d within model %0d", n, s, dp, model));
    check(rsp >= 30 * n && rsp <= 45 * n, $sformatf("N=%0d RSP %0d", n, rsp));
    $display("N=%0d spikes/node=%0d: RSP %0d  ETP %0d  DP %0d  model %0d  cycles/event %0.3f",
             n, s, rsp, dp - rsp, dp, model, real'(dp) / total);
  endtask

  initial begin
    int rsp, dp, rsp1, rsp6;
    for (int k = 0; k < NMAX; k++) begin cfg_we[k] = 0; cfg_addr[k] = 0; cfg_wdata[k] = 0; gen_run[k] = 0; end
    gen_spikes = 0; gen_exec = 0;
    for (int s = 500; s <= 1000; s += 500)
      for (int n = 1; n <= 6; n++) begin
        run_ring(n, s, rsp, dp);
        if (n == 1) rsp1 = rsp;
        if (n == 6) rsp6 = rsp;
      end
    check((rsp6 - rsp1) >= 5 * 30 && (rsp6 - rsp1) <= 5 * 45, "RSP grows linearly, 30-45 cycles per added node");
    // real-time capacity: 60 nodes, 58,560 events in 0.5 ms at 125 MHz
    run_ring(60, 976, rsp, dp);
    check(dp <= 62500, $sformatf("60-node DP %0d cycles fits the 62,500-cycle window", dp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
