// Self-checking test of aer_input_if with a real aer_fifo (depth 8): events
// are written during the execution phase, a full FIFO drops and flags an
// overflow, gen_eo_exec gives one eo_exec pulse a cycle later, no event is
// taken in the distribution phase, and eo_distrib reopens the EP.
module tb_aer_input_if;
  import aer_srt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic gen_valid = 0, gen_eo_exec = 0, eo_distrib = 0, gen_ready;
  addr_t gen_addr = 0, fifo_wdata, rdata;
  logic fifo_wr, fifo_full, eo_exec, overflow, rd = 0, empty, fovf;
  logic [3:0] count;
  int checks = 0, failures = 0, pulses = 0;

  aer_input_if dut (.*);
  aer_fifo #(.WIDTH(ADDR_W), .DEPTH(8)) u_fifo (.clk, .rst_n, .wr(fifo_wr), .wdata(fifo_wdata),
    .rd, .rdata, .empty, .full(fifo_full), .count, .overflow(fovf));
  always #5 clk = ~clk;
  always @(posedge clk) if (eo_exec) pulses++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(gen_ready, "EP open after reset");
    for (int i = 0; i < 5; i++) begin
      gen_valid = 1; gen_addr = addr_t'(100 + i); @(posedge clk); #1;
    end
    gen_valid = 0;
    check(count == 5, "5 events stored");
    check(rdata == 15'd100, "first event at head");
    gen_eo_exec = 1; @(posedge clk); #1; gen_eo_exec = 0;
    check(eo_exec, "eo_exec one cycle after gen_eo_exec");
    check(!gen_ready, "EP closed");
    @(posedge clk); #1;
    check(!eo_exec && pulses == 1, "eo_exec is a single pulse");
    gen_valid = 1; gen_addr = 15'h7777; @(posedge clk); #1; gen_valid = 0;
    check(count == 5, "no event taken in DP");
    gen_eo_exec = 1; @(posedge clk); #1; gen_eo_exec = 0;
    check(pulses == 1, "no second eo_exec in DP");
    // drain as the transmitter would, then end DP
    rd = 1; repeat (5) @(posedge clk); #1; rd = 0;
    check(empty, "drained");
    eo_distrib = 1; @(posedge clk); #1; eo_distrib = 0;
    check(gen_ready, "EP reopened by eo_distrib");
    for (int i = 0; i < 10; i++) begin
      gen_valid = 1; gen_addr = addr_t'(i); @(posedge clk); #1;
    end
    gen_valid = 0;
    check(count == 8, "FIFO full at 8");
    check(overflow, "overflow flagged on dropped event");
    for (int i = 0; i < 8; i++) begin
      check(rdata == addr_t'(i), "stored order");
      rd = 1; @(posedge clk); #1; rd = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
