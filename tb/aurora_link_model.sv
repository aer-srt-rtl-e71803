// Behavioural model of one serial link of the ring: the transmitting node's
// link core (8B/10B, 2-byte user interface), the serial line and the
// receiving node's link core, seen from their user-side streams. Not
// synthesizable logic; testbench use only.
//
// A word accepted from tx_tdata (tx_tvalid && tx_tready) appears on rx_tdata
// with rx_tvalid exactly LATENCY cycles later. While the transmitting node
// requests clock compensation (do_cc) the core sends compensation
// characters and does not accept user data (tx_tready low). drop_next, when
// pulsed, makes the link lose the next data packet (bit 15 set), to
// exercise error detection.
module aurora_link_model
  import aer_srt_pkg::*;
#(
  parameter int LATENCY = 36
) (
  input  logic clk,
  input  logic rst_n,
  input  pkt_t tx_tdata,
  input  logic tx_tvalid,
  output logic tx_tready,
  input  logic do_cc,
  input  logic drop_next,
  output pkt_t rx_tdata,
  output logic rx_tvalid,
  output int   cc_stall_cycles,
  output int   dropped
);
  pkt_t pipe_d [LATENCY];
  logic pipe_v [LATENCY];
  logic drop_armed;

  assign tx_tready = !do_cc;
  assign rx_tdata  = pipe_d[LATENCY-1];
  assign rx_tvalid = pipe_v[LATENCY-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) begin
        pipe_d[i] <= '0;
        pipe_v[i] <= 1'b0;
      end
      drop_armed      <= 1'b0;
      cc_stall_cycles <= 0;
      dropped         <= 0;
    end else begin
      logic take;
      take = tx_tvalid && tx_tready;
      if (drop_next) drop_armed <= 1'b1;
      if (do_cc && tx_tvalid) cc_stall_cycles <= cc_stall_cycles + 1;
      pipe_d[0] <= tx_tdata;
      pipe_v[0] <= take;
      if (take && drop_armed && is_data(tx_tdata)) begin
        pipe_v[0]  <= 1'b0;
        drop_armed <= 1'b0;
        dropped    <= dropped + 1;
      end
      for (int i = 1; i < LATENCY; i++) begin
        pipe_d[i] <= pipe_d[i-1];
        pipe_v[i] <= pipe_v[i-1];
      end
    end
  end
endmodule
