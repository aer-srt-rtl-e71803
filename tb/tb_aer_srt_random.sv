// Randomised stress test of a 4-node ring at default node parameters. Each
// node leaves reset at a different time, so the clock-compensation bursts of
// the links fall at different moments. Over 12 emulation cycles every node
// draws a random spike count (0..1000, zero included) and a random
// execution-phase length, so nodes reach ring synchronisation far apart.
// Every node must receive exactly the spikes of every node, each tagged
// with its source and with the address the source generated, with no
// error or overflow flag raised.
module tb_aer_srt_random;
  import aer_srt_pkg::*;
  localparam int N = 4, NCYC = 12, LAT = 36;

  logic clk = 0;
  logic         rst_n    [N];
  logic         link_rst_n = 0;
  logic         cfg_we   [N];
  logic         cfg_addr [N];
  logic [7:0]   cfg_wdata[N];
  logic         gen_run  [N];
  logic [10:0]  gen_spikes[N];
  logic [15:0]  gen_exec [N];
  pkt_t         tx_tdata [N], rx_tdata[N];
  logic         tx_tvalid[N], tx_tready[N], rx_tvalid[N], do_cc[N];
  logic         out_valid[N], bypass_mode[N];
  event_t       out_event[N];
  logic [15:0]  own_returned[N];
  node_status_t status[N];
  int           cc_stall[N], dropped[N];
  int           checks = 0, failures = 0;

  for (genvar k = 0; k < N; k++) begin : g_ring
    aer_srt_node u_node (
      .clk, .rst_n(rst_n[k]), .cfg_we(cfg_we[k]), .cfg_addr(cfg_addr[k]), .cfg_wdata(cfg_wdata[k]),
      .gen_run(gen_run[k]), .gen_spikes(gen_spikes[k]), .gen_exec_cycles(gen_exec[k]),
      .tx_tdata(tx_tdata[k]), .tx_tvalid(tx_tvalid[k]), .tx_tready(tx_tready[k]),
      .rx_tdata(rx_tdata[k]), .rx_tvalid(rx_tvalid[k]), .do_cc(do_cc[k]),
      .out_valid(out_valid[k]), .out_event(out_event[k]), .bypass_mode(bypass_mode[k]),
      .own_returned(own_returned[k]), .status(status[k]));
    aurora_link_model #(.LATENCY(LAT)) u_link (
      .clk, .rst_n(link_rst_n), .tx_tdata(tx_tdata[k]), .tx_tvalid(tx_tvalid[k]),
      .tx_tready(tx_tready[k]), .do_cc(do_cc[k]), .drop_next(1'b0),
      .rx_tdata(rx_tdata[(k + 1) % N]), .rx_tvalid(rx_tvalid[(k + 1) % N]),
      .cc_stall_cycles(cc_stall[k]), .dropped(dropped[k]));
  end

  always #4 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected: per receiving node, per source, the set of addresses
  int   cur = 0;
  int   got[N][N];
  int   bad_addr = 0;
  int   sp_of[N];
  always @(posedge clk) begin
    for (int k = 0; k < N; k++) if (rst_n[k] && out_valid[k]) begin
      int src, idx;
      src = int'(out_event[k][EVENT_W-1 -: CHIP_ID_W]) - 1;
      idx = int'(out_event[k][10:0]);
      if (src < 0 || src >= N) bad_addr++;
      else begin
        // address {cycle[3:0], index}, indices arrive in order per source
        if (out_event[k][14:11] != 4'(cur) || idx != got[k][src]) bad_addr++;
        got[k][src]++;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit all;
    for (int k = 0; k < N; k++) begin
      rst_n[k] = 0; cfg_we[k] = 0; cfg_addr[k] = 0; cfg_wdata[k] = 0; gen_run[k] = 0;
      gen_spikes[k] = 0; gen_exec[k] = 0;
    end
    repeat (3) @(posedge clk); #1 link_rst_n = 1;
    // staggered reset release: CC bursts out of phase
    for (int k = 0; k < N; k++) begin
      repeat (1 + 1237 * k % 4999) @(posedge clk);
      #1 rst_n[k] = 1;
    end
    @(posedge clk); #1;
    for (int k = 0; k < N; k++) begin
      cfg_we[k] = 1; cfg_addr[k] = 0; cfg_wdata[k] = 8'(k + 1);
    end
    @(posedge clk); #1;
    for (int k = 0; k < N; k++) begin cfg_addr[k] = 1; cfg_wdata[k] = 8'(N); end
    @(posedge clk); #1;
    for (int k = 0; k < N; k++) cfg_we[k] = 0;
    for (int c = 0; c < NCYC; c++) begin
      cur = c % 16;
      for (int k = 0; k < N; k++) begin
        sp_of[k] = ($urandom_range(0, 5) == 0) ? 0 : $urandom_range(1, 1000);
        gen_spikes[k] = 11'(sp_of[k]);
        gen_exec[k]   = 16'($urandom_range(0, 3000));
        for (int j = 0; j < N; j++) got[k][j] = 0;
        gen_run[k] = 1;
      end
      do begin
        @(posedge clk); #1;
        all = 1;
        for (int k = 0; k < N; k++) if (status[k].emu_cycles != 16'(c + 1)) all = 0;
        // stop each node after this cycle so the next one uses new loads
        for (int k = 0; k < N; k++) if (status[k].emu_cycles == 16'(c + 1)) gen_run[k] = 0;
      end while (!all);
      for (int k = 0; k < N; k++) begin
        for (int j = 0; j < N; j++)
          check(got[k][j] == sp_of[j], $sformatf("cycle %0d node %0d got %0d of node %0d, exp %0d", c, k + 1, got[k][j], j + 1, sp_of[j]));
        check(!status[k].err_mismatch && !status[k].err_overflow, $sformatf("cycle %0d node %0d flags", c, k + 1));
      end
    end
    check(bad_addr == 0, $sformatf("%0d events with a wrong source or address", bad_addr));
    check(cc_stall[0] > 0 && cc_stall[N-1] > 0, "clock compensation on the links");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
