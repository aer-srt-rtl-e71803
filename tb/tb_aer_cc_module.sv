// Self-checking test of aer_cc_module: do_cc must be high for exactly
// CC_LEN cycles once every CC_PERIOD cycles. Run at the default period of
// 5000 cycles (10,000 bytes of a 2-byte lane) for several periods.
module tb_aer_cc_module;
  localparam int P = 5000, L = 6;
  logic clk = 0, rst_n = 0, do_cc;
  int checks = 0, failures = 0;
  int last_rise = -1, hi = 0, cyc = 0, bursts = 0;
  logic prev = 0;

  aer_cc_module #(.CC_PERIOD(P), .CC_LEN(L)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (8 * P) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (do_cc && !prev) begin
      if (last_rise >= 0) check(cyc - last_rise == P, $sformatf("period %0d", cyc - last_rise));
      last_rise = cyc;
      hi = 0;
    end
    if (do_cc) hi++;
    if (!do_cc && prev) begin
      check(hi == L, $sformatf("burst length %0d", hi));
      bursts++;
    end
    prev = do_cc;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    repeat (5 * P + 10) @(posedge clk);
    check(bursts == 5, $sformatf("bursts %0d", bursts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
