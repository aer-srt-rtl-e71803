// Self-checking test of aer_output_if: events appear one cycle later,
// unchanged; eo_distrib follows the done strobe by one cycle, after the last
// event; dp_events counts the events of each distribution phase.
module tb_aer_output_if;
  import aer_srt_pkg::*;
  logic clk = 0, rst_n = 0, ev_valid = 0, done_pulse = 0;
  event_t ev_data = 0, out_event;
  logic out_valid, eo_distrib;
  logic [15:0] dp_events;
  int checks = 0, failures = 0;
  event_t exp_q[$];
  int got = 0;
  bit seen_done = 0;

  aer_output_if dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      check(!seen_done, "event after eo_distrib");
      if (exp_q.size() > 0) begin
        check(out_event == exp_q[0], "event value");
        void'(exp_q.pop_front());
      end else check(0, "unexpected event");
      got++;
    end
    if (eo_distrib) seen_done = 1;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      int n;
      n = 20 + 17 * r;
      seen_done = 0;
      for (int i = 0; i < n; i++) begin
        ev_valid = ($urandom_range(0, 3) != 0);
        ev_data  = event_t'($urandom);
        if (ev_valid) exp_q.push_back(ev_data); else i--;
        done_pulse = (i == n - 1);
        @(posedge clk); #1;
      end
      ev_valid = 0; done_pulse = 0;
      @(posedge clk); #1;
      check(seen_done || eo_distrib, "eo_distrib seen");
      check(dp_events == 16'(n), $sformatf("dp_events %0d exp %0d", dp_events, n));
      check(exp_q.size() == 0, "all events delivered");
      repeat (3) @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
