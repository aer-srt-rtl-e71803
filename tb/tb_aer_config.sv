// Self-checking test of aer_config: reset values, Chip Id and Ring Size
// writes, and refusal of Ring Size values outside 1..128.
module tb_aer_config;
  import aer_srt_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0, cfg_addr = 0;
  logic [7:0] cfg_wdata = 0;
  chip_id_t chip_id;
  ring_size_t ring_size;
  int checks = 0, failures = 0;

  aer_config #(.CHIP_ID_RST(5), .RING_SIZE_RST(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic wr(logic a, logic [7:0] d);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d; @(posedge clk); #1; cfg_we = 0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(chip_id == 7'd5 && ring_size == 8'd3, "reset values");
    wr(0, 8'd100);  check(chip_id == 7'd100, "chip id write");
    check(ring_size == 8'd3, "ring size untouched");
    wr(1, 8'd6);    check(ring_size == 8'd6, "ring size write");
    wr(1, 8'd0);    check(ring_size == 8'd6, "ring size 0 refused");
    wr(1, 8'd129);  check(ring_size == 8'd6, "ring size 129 refused");
    wr(1, 8'd128);  check(ring_size == 8'd128, "ring size 128 accepted");
    wr(0, 8'hff);   check(chip_id == 7'h7f, "chip id is 7 bits");
    @(posedge clk); #1;
    check(chip_id == 7'h7f && ring_size == 8'd128, "values hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
