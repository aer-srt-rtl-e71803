// AER RX: decodes the packet stream arriving from the upstream node.
//
//  - SYNC packets are counted; when the count reaches Ring Size the ring is
//    synchronised and aer_on rises (end of the ring synchronisation phase).
//  - A START packet gives the Chip Id of the node whose events follow.
//  - Every data packet is passed on as an event {source Chip Id, address}
//    (ev_valid/ev_data, one cycle later). Data from the node's own Chip Id
//    has travelled the whole ring: it is not forwarded, only reported on
//    own_data for error detection.
//  - FINISH packets are counted; when the count reaches Ring Size every node
//    has finished, aer_on falls, aer_done rises and done_pulse fires.
//  - SYNC, START, FINISH and data from other nodes are written into the
//    Bypass FIFO (byp_wr/byp_wdata, combinational, same cycle as rx_tvalid)
//    to be retransmitted. IDLE packets are dropped.
//
// aer_done stays high until the next eo_exec. The write to the Bypass FIFO
// is combinational so that the last forwarded SYNC is already in the FIFO
// when aer_on is seen. The counting and forwarding rules follow the
// document; recognising a node's own SYNC and FINISH by their Chip Id field
// is this design's choice.
module aer_rx
  import aer_srt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  chip_id_t   chip_id,
  input  ring_size_t ring_size,
  input  logic       eo_exec,
  input  pkt_t       rx_tdata,
  input  logic       rx_tvalid,
  output logic       byp_wr,
  output pkt_t       byp_wdata,
  output logic       ev_valid,
  output event_t     ev_data,
  output logic       own_data,
  output logic       aer_on,
  output logic       aer_done,
  output logic       done_pulse,
  output chip_id_t   cur_src
);
  ring_size_t sync_cnt, fin_cnt;
  logic       is_d;
  ctrl_e      ctl;

  assign is_d      = is_data(rx_tdata);
  assign ctl       = ctrl_of(rx_tdata);
  assign byp_wdata = rx_tdata;

  always_comb begin
    byp_wr = 1'b0;
    if (rx_tvalid) begin
      if (is_d)                   byp_wr = (cur_src != chip_id);
      else if (ctl != CTRL_IDLE)  byp_wr = (id_of(rx_tdata) != chip_id);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync_cnt   <= '0;
      fin_cnt    <= '0;
      cur_src    <= '0;
      ev_valid   <= 1'b0;
      ev_data    <= '0;
      own_data   <= 1'b0;
      aer_on     <= 1'b0;
      aer_done   <= 1'b0;
      done_pulse <= 1'b0;
    end else begin
      ev_valid   <= 1'b0;
      own_data   <= 1'b0;
      done_pulse <= 1'b0;
      if (eo_exec) aer_done <= 1'b0;
      if (rx_tvalid) begin
        if (is_d) begin
          ev_valid <= 1'b1;
          ev_data  <= {cur_src, rx_tdata[ADDR_W-1:0]};
          own_data <= (cur_src == chip_id);
        end else begin
          unique case (ctl)
            CTRL_SYNC: begin
              if (sync_cnt + 1'b1 >= ring_size) begin
                sync_cnt <= '0;
                aer_on   <= 1'b1;
              end else begin
                sync_cnt <= sync_cnt + 1'b1;
              end
            end
            CTRL_START: cur_src <= id_of(rx_tdata);
            CTRL_FINISH: begin
              if (fin_cnt + 1'b1 >= ring_size) begin
                fin_cnt    <= '0;
                aer_on     <= 1'b0;
                aer_done   <= 1'b1;
                done_pulse <= 1'b1;
              end else begin
                fin_cnt <= fin_cnt + 1'b1;
              end
            end
            default: ;
          endcase
        end
      end
    end
  end

  // The ring cannot be synchronised for a new cycle before the old one ended.
  a_phases: assert property (@(posedge clk) disable iff (!rst_n) !(aer_on && aer_done));
endmodule
