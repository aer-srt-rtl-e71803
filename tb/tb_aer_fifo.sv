// Self-checking test of aer_fifo: random pushes and pops against a queue
// model, checking head word, count, empty/full and the overflow flag on a
// refused write. Depth reduced to 16 so full and wrap-around happen often.
module tb_aer_fifo;
  localparam int W = 16, D = 16;
  logic clk = 0, rst_n = 0;
  logic wr, rd, empty, full, overflow;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int n_full = 0, n_ovf = 0;

  aer_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t q=%0d count=%0d", what, $time, q.size(), count); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; rd = 0; wdata = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 4000; i++) begin
      // bias toward filling in the first half, draining in the second
      wr    = ($urandom_range(0, 99) < ((i % 400) < 200 ? 75 : 30));
      rd    = ($urandom_range(0, 99) < ((i % 400) < 200 ? 30 : 75));
      wdata = W'($urandom);
      #1;
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(rdata == q[0], $sformatf("head %h exp %h", rdata, q[0]));
      if (full) n_full++;
      begin
        bit do_w, do_r;
        do_w = wr && (q.size() < D);
        do_r = rd && (q.size() > 0);
        @(posedge clk);
        if (do_r) void'(q.pop_front());
        if (do_w) q.push_back(wdata);
        #1;
      end
    end
    // explicit overflow: fill, then write once more
    wr = 0; rd = 1;
    while (!empty) @(posedge clk);
    #1; q.delete(); rd = 0;
    for (int i = 0; i < D; i++) begin wr = 1; wdata = W'(i); @(posedge clk); #1; end
    check(full, "full after D writes");
    wdata = 16'hdead; @(posedge clk); #1; wr = 0;
    check(overflow, "overflow after write to full");
    n_ovf += overflow;
    @(posedge clk); #1;
    check(!overflow, "overflow is one cycle");
    for (int i = 0; i < D; i++) begin
      check(rdata == W'(i), "drain order");
      rd = 1; @(posedge clk); #1;
    end
    rd = 0;
    check(empty, "empty after drain");
    check(n_full > 0, "full reached in random phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
