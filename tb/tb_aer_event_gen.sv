// Self-checking test of aer_event_gen: per emulation cycle it must emit
// `spikes` events with addresses {cycle[3:0], index}, pulse eo_exec after
// max(spikes, exec_cycles) cycles, wait for eo_distrib, and report the
// events received (all, and with its own Chip Id).
module tb_aer_event_gen;
  import aer_srt_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, ev_ready = 1, eo_distrib = 0, rx_valid = 0;
  logic [10:0] spikes = 0;
  logic [15:0] exec_cycles = 0, emu_cycles, rx_count, last_rx_count, last_own_count;
  logic ev_valid, eo_exec;
  addr_t ev_addr;
  event_t rx_event = 0;
  chip_id_t chip_id = 7'd9;
  int checks = 0, failures = 0;

  aer_event_gen #(.SPIKE_CNT_W(11)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic one_cycle(int c, int ns, int ne, bit first);
    int n, t, exp_len;
    spikes = 11'(ns); exec_cycles = 16'(ne);
    // counted from run (first cycle) or from the cycle after eo_distrib:
    // max(spikes, exec_cycles) + 1 cycles until eo_exec is seen
    exp_len = ((ns > ne) ? ns : ne) + 1;
    n = 0; t = 0;
    while (!eo_exec) begin
      if (ev_valid) begin
        check(ev_addr == {4'(c), 11'(n)}, $sformatf("address %h", ev_addr));
        n++;
      end
      @(posedge clk); #1; t++;
    end
    check(n == ns, $sformatf("spikes %0d exp %0d", n, ns));
    check(t == exp_len + 1, $sformatf("EP length %0d exp %0d", t, exp_len + 1));
    // distribution: 3 own, 4 foreign events
    for (int i = 0; i < 7; i++) begin
      rx_valid = 1; rx_event = {(i < 3) ? chip_id : 7'd1, 15'(i)};
      @(posedge clk); #1;
    end
    rx_valid = 0;
    check(emu_cycles == 16'(c), "cycle not yet counted");
    eo_distrib = 1; @(posedge clk); #1; eo_distrib = 0;
    check(emu_cycles == 16'(c + 1), "cycle counted");
    check(last_rx_count == 16'd7 && last_own_count == 16'd3, "received counts");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    spikes = 5; exec_cycles = 12;
    repeat (5) @(posedge clk); #1;
    check(!ev_valid && !eo_exec, "idle until run");
    run = 1;
    one_cycle(0, 5, 12, 1);
    one_cycle(1, 20, 3, 0);
    one_cycle(2, 0, 4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
