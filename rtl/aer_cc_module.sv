// Clock Compensation (CC) module. Nodes of the ring run from separate
// oscillators, so the serial link periodically inserts clock-compensation
// sequences that the receiving side may drop or repeat to absorb the small
// frequency difference. This block tells the link core when to do so.
//
// A free-running counter raises do_cc for CC_LEN cycles once every
// CC_PERIOD cycles; while do_cc is high the link core sends compensation
// characters and stalls user data. The default period, 5000 cycles of a
// 2-byte lane, is the 10,000-byte interval of the link protocol; the
// length of the burst (6 cycles) is this design's choice.
module aer_cc_module #(
  parameter int unsigned CC_PERIOD = 5000,
  parameter int unsigned CC_LEN    = 6
) (
  input  logic clk,
  input  logic rst_n,
  output logic do_cc
);
  localparam int unsigned CW = $clog2(CC_PERIOD + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt   <= '0;
      do_cc <= 1'b0;
    end else begin
      cnt   <= (cnt == CW'(CC_PERIOD - 1)) ? '0 : cnt + 1'b1;
      do_cc <= (cnt >= CW'(CC_PERIOD - CC_LEN));
    end
  end
endmodule
