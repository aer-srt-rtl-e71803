// AER-SRT Network Interface: connects one node of a spiking neural network
// emulator to a unidirectional ring of nodes over a serial link.
//
// Events produced in the execution phase go through the Input Interface
// into the Input FIFO. When the phase ends, AER TX sends a SYNC and forwards
// the other nodes' SYNCs; AER RX counts SYNCs up to Ring Size and raises
// AER_ON. TX then sends START, the node's events and FINISH, and after that
// forwards whatever RX put into the Bypass FIFO. Every node removes its own
// packets when they come back; when RX has seen Ring Size FINISH packets it
// raises AER_done, the Output Interface pulses AER_eo_distrib and the next
// execution phase can start. AER_error compares the events sent with those
// that came back; AER_CONFIG holds Chip Id and Ring Size; the CC module
// requests clock compensation from the link core.
//
// Link side: tx_tdata/tx_tvalid/tx_tready and rx_tdata/rx_tvalid are the
// 16-bit user streams of the serial link core, do_cc its clock
// compensation request. Block partitioning and the 1024-word FIFOs follow
// the document's block diagram.
module aer_srt_ni
  import aer_srt_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH    = 1024,
  parameter int unsigned CHIP_ID_RST   = 1,
  parameter int unsigned RING_SIZE_RST = 3,
  parameter int unsigned CC_PERIOD     = 5000,
  parameter int unsigned CC_LEN        = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        cfg_we,
  input  logic        cfg_addr,
  input  logic [7:0]  cfg_wdata,
  output chip_id_t    chip_id,
  output ring_size_t  ring_size,
  // events in (execution phase)
  input  logic        in_valid,
  input  addr_t       in_addr,
  output logic        in_ready,
  input  logic        in_eo_exec,
  // events out (distribution phase)
  output logic        out_valid,
  output event_t      out_event,
  output logic        aer_eo_distrib,
  // phase and error status
  output logic        aer_eo_exec,
  output logic        aer_on,
  output logic        aer_done,
  output logic        bypass_mode,
  output logic        err_mismatch,
  output logic        err_overflow,
  output logic [15:0] err_count,
  output logic [15:0] dp_events,
  // serial link core user side
  output pkt_t        tx_tdata,
  output logic        tx_tvalid,
  input  logic        tx_tready,
  input  pkt_t        rx_tdata,
  input  logic        rx_tvalid,
  output logic        do_cc
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic               in_wr, in_rd, in_empty, in_full, in_ovf, in_drop;
  addr_t              in_wdata, in_rdata;
  logic [CW-1:0]      in_count, byp_count;
  logic               byp_wr, byp_rd, byp_empty, byp_full, byp_ovf;
  pkt_t               byp_wdata, byp_rdata;
  logic               ev_valid, own_data, done_pulse;
  event_t             ev_data;
  chip_id_t           cur_src;
  logic [15:0]        sent_cnt, ret_cnt;

  aer_config #(.CHIP_ID_RST(CHIP_ID_RST), .RING_SIZE_RST(RING_SIZE_RST)) u_config (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .chip_id, .ring_size);

  aer_input_if u_input_if (
    .clk, .rst_n, .gen_valid(in_valid), .gen_addr(in_addr), .gen_ready(in_ready),
    .gen_eo_exec(in_eo_exec), .eo_distrib(aer_eo_distrib), .fifo_wr(in_wr),
    .fifo_wdata(in_wdata), .fifo_full(in_full), .eo_exec(aer_eo_exec), .overflow(in_drop));

  aer_fifo #(.WIDTH(ADDR_W), .DEPTH(FIFO_DEPTH)) u_input_fifo (
    .clk, .rst_n, .wr(in_wr), .wdata(in_wdata), .rd(in_rd), .rdata(in_rdata),
    .empty(in_empty), .full(in_full), .count(in_count), .overflow(in_ovf));

  aer_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_bypass_fifo (
    .clk, .rst_n, .wr(byp_wr), .wdata(byp_wdata), .rd(byp_rd), .rdata(byp_rdata),
    .empty(byp_empty), .full(byp_full), .count(byp_count), .overflow(byp_ovf));

  aer_tx u_tx (
    .clk, .rst_n, .chip_id, .eo_exec(aer_eo_exec), .aer_on, .aer_done,
    .in_empty, .in_rdata, .in_rd, .byp_empty, .byp_rdata, .byp_rd,
    .tx_tdata, .tx_tvalid, .tx_tready, .bypass_mode);

  aer_rx u_rx (
    .clk, .rst_n, .chip_id, .ring_size, .eo_exec(aer_eo_exec), .rx_tdata, .rx_tvalid,
    .byp_wr, .byp_wdata, .ev_valid, .ev_data, .own_data, .aer_on, .aer_done,
    .done_pulse, .cur_src);

  aer_output_if u_output_if (
    .clk, .rst_n, .ev_valid, .ev_data, .done_pulse, .out_valid, .out_event,
    .eo_distrib(aer_eo_distrib), .dp_events);

  aer_error #(.CNT_W(16)) u_error (
    .clk, .rst_n, .sent(in_wr), .returned(own_data), .aer_done(done_pulse),
    .err_mismatch, .err_count, .sent_cnt, .ret_cnt);

  aer_cc_module #(.CC_PERIOD(CC_PERIOD), .CC_LEN(CC_LEN)) u_cc (.clk, .rst_n, .do_cc);

  // A refused write in either FIFO loses events: reported, sticky.
  always_ff @(posedge clk) begin
    if (!rst_n)                           err_overflow <= 1'b0;
    else if (in_drop || in_ovf || byp_ovf) err_overflow <= 1'b1;
  end
endmodule
