// End-to-end test of the design: a ring of three aer_srt_node instances at
// their default parameters (1024-word FIFOs, 5000-cycle clock compensation
// period), joined by link models, node k sending to node k+1. Chip Ids 1..3
// are written through the configuration port; Ring Size keeps its reset
// value of 3.
//
// Four emulation cycles:
//   0  1000 spikes per node, nodes finish their execution phases at
//      different times (ring synchronisation has to wait)
//   1  500 spikes per node
//   2  1000 spikes per node, one data packet lost on link 0 (error detection)
//   3  node 3 produces 1100 spikes, more than its Input FIFO holds (overflow)
// Checks per cycle and node: events received, own events returned, error
// and overflow flags. Timing of cycle 0 is held against the distribution
// time model t = sum(s_n) + 42 N + 56 cycles, and the synchronisation phase
// against roughly 38-42 cycles per node. Each protocol mechanism must occur
// at least once.
module tb_aer_srt_ring;
  import aer_srt_pkg::*;
  localparam int N = 3;
  localparam int LAT = 36;

  logic clk = 0, rst_n = 0;
  logic         cfg_we   [N];
  logic         cfg_addr [N];
  logic [7:0]   cfg_wdata[N];
  logic         gen_run  [N];
  logic [10:0]  gen_spikes[N];
  logic [15:0]  gen_exec [N];
  pkt_t         tx_tdata [N], rx_tdata[N];
  logic         tx_tvalid[N], tx_tready[N], rx_tvalid[N], do_cc[N], drop_next[N];
  logic         out_valid[N], bypass_mode[N];
  event_t       out_event[N];
  logic [15:0]  own_returned[N];
  node_status_t status[N];
  int           cc_stall[N], dropped[N];

  int checks = 0, failures = 0;
  int cyc = 0;

  for (genvar k = 0; k < N; k++) begin : g_ring
    aer_srt_node u_node (
      .clk, .rst_n, .cfg_we(cfg_we[k]), .cfg_addr(cfg_addr[k]), .cfg_wdata(cfg_wdata[k]),
      .gen_run(gen_run[k]), .gen_spikes(gen_spikes[k]), .gen_exec_cycles(gen_exec[k]),
      .tx_tdata(tx_tdata[k]), .tx_tvalid(tx_tvalid[k]), .tx_tready(tx_tready[k]),
      .rx_tdata(rx_tdata[k]), .rx_tvalid(rx_tvalid[k]),
      .do_cc(do_cc[k]), .out_valid(out_valid[k]), .out_event(out_event[k]),
      .bypass_mode(bypass_mode[k]), .own_returned(own_returned[k]), .status(status[k]));
    // link k carries node k's stream; its far end is node k+1's receiver
    aurora_link_model #(.LATENCY(LAT)) u_link (
      .clk, .rst_n, .tx_tdata(tx_tdata[k]), .tx_tvalid(tx_tvalid[k]), .tx_tready(tx_tready[k]),
      .do_cc(do_cc[k]), .drop_next(drop_next[k]),
      .rx_tdata(rx_tdata[(k + 1) % N]), .rx_tvalid(rx_tvalid[(k + 1) % N]),
      .cc_stall_cycles(cc_stall[k]), .dropped(dropped[k]));
  end

  always #4 clk = ~clk;   // 125 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // ---- observation ---------------------------------------------------------
  int  t_exec[N], t_on[N], t_dist[N];
  bit  in_ep[N];
  int  ev_by_src[N][N];          // [receiver][source]
  int  n_sync_wait = 0, n_idle = 0, n_bypass_fwd = 0, n_own_removed = 0;
  int  n_cc_data = 0, n_dist_pulses = 0;
  logic on_q[N];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int k = 0; k < N; k++) begin
      int rxk;
      rxk = k;   // node k receives rx_tdata[k]
      if (status[k].aer_eo_exec) begin t_exec[k] = cyc; in_ep[k] = 0; end
      if (status[k].aer_on && !on_q[k]) t_on[k] = cyc;
      on_q[k] = status[k].aer_on;
      if (status[k].aer_eo_distrib) begin t_dist[k] = cyc; in_ep[k] = 1; n_dist_pulses++; end
      if (rx_tvalid[rxk] && !is_data(rx_tdata[rxk])) begin
        if (ctrl_of(rx_tdata[rxk]) == CTRL_SYNC && in_ep[k]) n_sync_wait++;
        if (ctrl_of(rx_tdata[rxk]) == CTRL_IDLE) n_idle++;
      end
      if (out_valid[k]) begin
        int src;
        src = int'(out_event[k][EVENT_W-1 -: CHIP_ID_W]) - 1;
        if (src >= 0 && src < N) ev_by_src[k][src]++;
        else check(0, "event with unknown Chip Id");
        if (src == k) n_own_removed++;
      end
      if (bypass_mode[k] && tx_tready[k] && is_data(tx_tdata[k])) n_bypass_fwd++;
      if (do_cc[k] && (status[k].aer_on || bypass_mode[k])) n_cc_data++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wait_all_dist();
    bit all;
    int start;
    start = cyc;
    do begin
      @(posedge clk); #1;
      all = 1;
      for (int k = 0; k < N; k++) if (t_dist[k] <= start) all = 0;
    end while (!all);
  endtask

  task automatic emu_cycle(int c, int sp[N], int ex[N], int drop_on);
    int exp_sp[N];
    int total;
    for (int k = 0; k < N; k++) begin
      gen_spikes[k] = 11'(sp[k]);
      gen_exec[k]   = 16'(ex[k]);
      for (int j = 0; j < N; j++) ev_by_src[k][j] = 0;
      exp_sp[k] = (sp[k] > 1024) ? 1024 : sp[k];
    end
    if (drop_on >= 0) begin
      // arm the loss once the ring is synchronised: the next data packet on
      // the link, which is the sending node's own first event
      fork
        begin
          while (!status[drop_on].aer_on) begin @(posedge clk); #1; end
          drop_next[drop_on] = 1; @(posedge clk); #1; drop_next[drop_on] = 0;
        end
      join_none
    end
    wait_all_dist();
    total = 0;
    for (int k = 0; k < N; k++) total += exp_sp[k];
    for (int k = 0; k < N; k++) begin
      for (int j = 0; j < N; j++) begin
        int e;
        e = exp_sp[j] - ((drop_on == j) ? 1 : 0);
        check(ev_by_src[k][j] == e,
              $sformatf("cycle %0d node %0d got %0d events of node %0d, exp %0d", c, k + 1, ev_by_src[k][j], j + 1, e));
      end
      check(int'(own_returned[k]) == exp_sp[k] - ((drop_on == k) ? 1 : 0), $sformatf("cycle %0d node %0d own returned", c, k + 1));
      check(int'(status[k].rx_events) == total - ((drop_on >= 0) ? 1 : 0), $sformatf("cycle %0d node %0d rx_events %0d", c, k + 1, status[k].rx_events));
    end
    @(posedge clk); #1;
    for (int k = 0; k < N; k++) begin
      check(status[k].err_mismatch == (drop_on == k), $sformatf("cycle %0d node %0d mismatch flag", c, k + 1));
      check(status[k].err_overflow == (sp[k] > 1024), $sformatf("cycle %0d node %0d overflow flag", c, k + 1));
    end
  endtask

  initial begin
    int last, rsp, dp, etp, total, model;
    for (int k = 0; k < N; k++) begin
      cfg_we[k] = 0; cfg_addr[k] = 0; cfg_wdata[k] = 0; gen_run[k] = 0;
      gen_spikes[k] = 0; gen_exec[k] = 0; drop_next[k] = 0; in_ep[k] = 1; on_q[k] = 0;
      t_exec[k] = 0; t_on[k] = 0; t_dist[k] = 0;
    end
    repeat (4) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < N; k++) begin
      cfg_we[k] = 1; cfg_addr[k] = 0; cfg_wdata[k] = 8'(k + 1);
    end
    @(posedge clk); #1;
    for (int k = 0; k < N; k++) cfg_we[k] = 0;
    check(status[0].emu_cycles == 0, "reset state");
    repeat (50) @(posedge clk); #1;   // link idles
    for (int k = 0; k < N; k++) gen_run[k] = 1;

    emu_cycle(0, '{1000, 1000, 1000}, '{1000, 1500, 1200}, -1);
    // timing of the node that finished its execution phase last (node 2)
    last = 1;
    rsp  = t_on[last] - t_exec[last];
    dp   = t_dist[last] - t_exec[last];
    etp  = dp - rsp;
    total = 3000;
    model = total + 42 * N + 56;
    $display("RSP %0d cycles (%0d per node), ETP %0d cycles, DP %0d cycles, model %0d, %0.3f cycles/event",
             rsp, rsp / N, etp, dp, model, real'(dp) / total);
    check(rsp >= 30 * N && rsp <= 45 * N, "RSP about 38-42 cycles per node");
    check(etp >= total && etp <= total + 100, "ETP about one cycle per event");
    check(dp <= model, "DP within the distribution time model");

    emu_cycle(1, '{500, 500, 500}, '{600, 600, 600}, -1);
    emu_cycle(2, '{1000, 1000, 1000}, '{1000, 1000, 1000}, 0);
    emu_cycle(3, '{300, 200, 1100}, '{400, 400, 400}, -1);

    for (int k = 0; k < N; k++)
      check(status[k].emu_cycles == 16'd4, $sformatf("node %0d completed 4 emulation cycles", k + 1));
    $display("mechanisms: sync_wait=%0d idle=%0d bypass_fwd=%0d own_removed=%0d cc_during_dp=%0d dist=%0d drop=%0d",
             n_sync_wait, n_idle, n_bypass_fwd, n_own_removed, n_cc_data, n_dist_pulses, dropped[0]);
    check(n_sync_wait > 0, "ring synchronisation waited for a late node");
    check(n_idle > 0, "IDLE packets kept the link busy");
    check(n_bypass_fwd > 0, "bypass forwarding");
    check(n_own_removed > 0, "own events returned and removed");
    check(n_cc_data > 0, "clock compensation during distribution");
    check(dropped[0] == 1, "link loss injected");
    check(status[0].err_count == 16'd1, "error detected once at node 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
