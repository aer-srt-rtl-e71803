// AER_CONFIG: holds the two values a node needs to join an AER-SRT ring, its
// 7-bit Chip Id and the Ring Size (number of nodes, 1..128). Nothing else
// has to change when nodes are added to or removed from a ring.
//
// A register write (cfg_we with cfg_addr 0 = Chip Id, 1 = Ring Size) takes
// effect on the next clock edge. A Ring Size write outside 1..128 is refused
// and leaves the old value. Reset values come from the parameters. The two
// values and the 7-bit width follow the protocol; the write port, its
// address map and the range check are this design's choice.
module aer_config
  import aer_srt_pkg::*;
#(
  parameter int unsigned CHIP_ID_RST   = 1,
  parameter int unsigned RING_SIZE_RST = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_we,
  input  logic       cfg_addr,
  input  logic [7:0] cfg_wdata,
  output chip_id_t   chip_id,
  output ring_size_t ring_size
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chip_id   <= chip_id_t'(CHIP_ID_RST);
      ring_size <= ring_size_t'(RING_SIZE_RST);
    end else if (cfg_we) begin
      if (!cfg_addr)
        chip_id <= cfg_wdata[CHIP_ID_W-1:0];
      else if (cfg_wdata >= 8'd1 && cfg_wdata <= 8'd128)
        ring_size <= cfg_wdata;
    end
  end
endmodule
