// Self-checking test of aer_error: sent and returned counts are compared at
// each aer_done strobe; a mismatch sets err_mismatch and counts in
// err_count, a match clears err_mismatch. Counts restart after each strobe.
module tb_aer_error;
  logic clk = 0, rst_n = 0, sent = 0, returned = 0, aer_done = 0;
  logic err_mismatch;
  logic [15:0] err_count, sent_cnt, ret_cnt;
  int checks = 0, failures = 0;

  aer_error #(.CNT_W(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic round(int ns, int nr, bit exp_err, int exp_cnt);
    for (int i = 0; i < ns; i++) begin sent = 1; @(posedge clk); #1; sent = 0; end
    for (int i = 0; i < nr; i++) begin returned = 1; @(posedge clk); #1; returned = 0; end
    check(sent_cnt == 16'(ns) && ret_cnt == 16'(nr), "counts before compare");
    aer_done = 1; @(posedge clk); #1; aer_done = 0;
    check(err_mismatch == exp_err, $sformatf("mismatch flag after %0d/%0d", ns, nr));
    check(err_count == 16'(exp_cnt), "error count");
    check(sent_cnt == 0 && ret_cnt == 0, "counts restart");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    round(10, 10, 0, 0);
    round(7, 6, 1, 1);
    round(300, 300, 0, 1);
    round(0, 1, 1, 2);
    round(0, 0, 0, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
