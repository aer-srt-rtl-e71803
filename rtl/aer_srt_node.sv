// One node of an AER-SRT ring: an Event Generator/Consumer, standing in for
// the node's neural emulator, attached to the AER-SRT Network Interface.
//
// Nodes form a unidirectional ring: each node's tx_* stream goes through a
// serial link core (8B/10B, one 16-bit word per cycle at 125 MHz) to the
// next node's rx_* stream. Every emulation cycle has an execution phase,
// in which the generator produces its spikes, and a distribution phase, in
// which all spikes of all nodes are broadcast around the ring: ring
// synchronisation by SYNC packets, then each node's START, events and
// FINISH, forwarded by every other node until they return to their source.
// The link core itself is not part of this module: its user-side streams
// and the clock-compensation request do_cc are ports.
//
// Configuration (Chip Id, Ring Size) is written through cfg_*; generator
// load through gen_spikes and gen_exec_cycles; status reports phases,
// counters and errors. All logic is on clk with a synchronous active-low
// reset.
module aer_srt_node
  import aer_srt_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH    = 1024,
  parameter int unsigned CHIP_ID_RST   = 1,
  parameter int unsigned RING_SIZE_RST = 3,
  parameter int unsigned CC_PERIOD     = 5000,
  parameter int unsigned CC_LEN        = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_we,
  input  logic         cfg_addr,
  input  logic [7:0]   cfg_wdata,
  input  logic         gen_run,
  input  logic [10:0]  gen_spikes,
  input  logic [15:0]  gen_exec_cycles,
  output pkt_t         tx_tdata,
  output logic         tx_tvalid,
  input  logic         tx_tready,
  input  pkt_t         rx_tdata,
  input  logic         rx_tvalid,
  output logic         do_cc,
  output logic         out_valid,
  output event_t       out_event,
  output logic         bypass_mode,
  output logic [15:0]  own_returned,
  output node_status_t status
);
  logic       ev_valid, ev_ready, gen_eo_exec;
  addr_t      ev_addr;
  chip_id_t   chip_id;
  ring_size_t ring_size;
  logic       eo_exec, aer_on, aer_done, eo_distrib, err_mismatch, err_overflow;
  logic [15:0] err_count, dp_events, emu_cycles, rx_count, last_rx_count;

  aer_event_gen #(.SPIKE_CNT_W(11)) u_gen (
    .clk, .rst_n, .run(gen_run), .spikes(gen_spikes), .exec_cycles(gen_exec_cycles),
    .ev_valid, .ev_addr, .ev_ready, .eo_exec(gen_eo_exec), .eo_distrib,
    .rx_valid(out_valid), .rx_event(out_event), .chip_id, .emu_cycles,
    .last_own_count(own_returned), .rx_count, .last_rx_count);

  aer_srt_ni #(
    .FIFO_DEPTH(FIFO_DEPTH), .CHIP_ID_RST(CHIP_ID_RST), .RING_SIZE_RST(RING_SIZE_RST),
    .CC_PERIOD(CC_PERIOD), .CC_LEN(CC_LEN)
  ) u_ni (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .chip_id, .ring_size,
    .in_valid(ev_valid), .in_addr(ev_addr), .in_ready(ev_ready), .in_eo_exec(gen_eo_exec),
    .out_valid, .out_event, .aer_eo_distrib(eo_distrib),
    .aer_eo_exec(eo_exec), .aer_on, .aer_done, .bypass_mode, .err_mismatch, .err_overflow,
    .err_count, .dp_events, .tx_tdata, .tx_tvalid, .tx_tready, .rx_tdata, .rx_tvalid, .do_cc);

  assign status = '{aer_eo_exec: eo_exec, aer_on: aer_on, aer_done: aer_done,
                    aer_eo_distrib: eo_distrib, err_mismatch: err_mismatch,
                    err_overflow: err_overflow, err_count: err_count,
                    emu_cycles: emu_cycles, rx_events: dp_events};
endmodule
