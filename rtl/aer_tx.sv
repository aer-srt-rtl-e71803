// AER TX: builds the packet stream sent to the downstream node. A word is
// offered on every cycle (tx_tvalid stays high after reset) and moves when
// the link accepts it (tx_tready). What is sent depends on the phase:
//
//   S_EXEC    execution phase: IDLE packets keep the serial link locked.
//             SYNCs that arrive from other nodes wait in the Bypass FIFO.
//   S_SYNC    AER_eo_exec seen: send this node's SYNC once.
//   S_RSP     ring synchronisation: forward SYNCs queued in the Bypass FIFO;
//             once AER_ON is high and no SYNC is left at the FIFO head,
//             send START(Chip Id).
//   S_DATA    send the Input FIFO contents as data packets, then FINISH.
//   S_BYPASS  forward the Bypass FIFO (IDLE when it is empty) until AER_done
//             is high and no packet of this cycle is left, then S_EXEC.
//
// An eo_exec pulse is remembered, so it may arrive while the previous
// distribution phase is still being drained. The sequence SYNC, START,
// data, FINISH, bypass, IDLE follows the document; draining queued SYNCs
// before START, which keeps every node's SYNCs ahead of its data on the
// ring, and leaving next-cycle SYNCs queued at the end of bypass mode are
// this design's choices.
module aer_tx
  import aer_srt_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  chip_id_t chip_id,
  input  logic     eo_exec,
  input  logic     aer_on,
  input  logic     aer_done,
  // Input FIFO read side (first-word fall-through)
  input  logic     in_empty,
  input  addr_t    in_rdata,
  output logic     in_rd,
  // Bypass FIFO read side (first-word fall-through)
  input  logic     byp_empty,
  input  pkt_t     byp_rdata,
  output logic     byp_rd,
  // to the link
  output pkt_t     tx_tdata,
  output logic     tx_tvalid,
  input  logic     tx_tready,
  output logic     bypass_mode
);
  typedef enum logic [2:0] {S_EXEC, S_SYNC, S_RSP, S_DATA, S_BYPASS} state_e;
  state_e state, nxt;
  logic   pend_exec;
  logic   byp_sync;

  assign byp_sync    = !byp_empty && !is_data(byp_rdata) && ctrl_of(byp_rdata) == CTRL_SYNC;
  assign bypass_mode = (state == S_BYPASS);

  always_comb begin
    nxt      = state;
    tx_tdata = mk_ctrl(CTRL_IDLE, chip_id);
    in_rd    = 1'b0;
    byp_rd   = 1'b0;
    unique case (state)
      S_EXEC: if (pend_exec) nxt = S_SYNC;
      S_SYNC: begin
        tx_tdata = mk_ctrl(CTRL_SYNC, chip_id);
        if (tx_tready) nxt = S_RSP;
      end
      S_RSP: begin
        if (byp_sync) begin
          tx_tdata = byp_rdata;
          byp_rd   = tx_tready;
        end else if (aer_on) begin
          tx_tdata = mk_ctrl(CTRL_START, chip_id);
          if (tx_tready) nxt = S_DATA;
        end
      end
      S_DATA: begin
        if (!in_empty) begin
          tx_tdata = mk_data(in_rdata);
          in_rd    = tx_tready;
        end else begin
          tx_tdata = mk_ctrl(CTRL_FINISH, chip_id);
          if (tx_tready) nxt = S_BYPASS;
        end
      end
      S_BYPASS: begin
        if (aer_done && (byp_empty || byp_sync)) begin
          nxt = S_EXEC;
        end else if (!byp_empty) begin
          tx_tdata = byp_rdata;
          byp_rd   = tx_tready;
        end
      end
      default: nxt = S_EXEC;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_EXEC;
      pend_exec <= 1'b0;
      tx_tvalid <= 1'b0;
    end else begin
      state     <= nxt;
      tx_tvalid <= 1'b1;
      if (state == S_EXEC && pend_exec) pend_exec <= 1'b0;
      else if (eo_exec)                 pend_exec <= 1'b1;
    end
  end

  a_one_source: assert property (@(posedge clk) disable iff (!rst_n) !(in_rd && byp_rd));
endmodule
