// Shared types and constants of the AER-SRT ring protocol.
//
// Every word on the ring is a 16-bit packet. Bit 15 tells data (1) from
// control (0). A data packet carries a 15-bit AER event address in bits 14:0.
// A control packet carries a 3-bit header in bits 14:12 selecting one of four
// types (IDLE, SYNC, START, FINISH) and, in bits 6:0, the 7-bit Chip Id of
// the node that produced it. The 16-bit length, the data/control bit, the
// 3-bit header, the four control types and the 7-bit Chip Id follow the
// protocol definition; the header codes and the Chip Id field in SYNC and
// FINISH (used to take a node's own packets off the ring) are this design's
// choice. Events handed to the node are 22 bits: {source Chip Id, address}.
package aer_srt_pkg;

  localparam int unsigned PKT_W     = 16;
  localparam int unsigned ADDR_W    = 15;  // event address inside a data packet
  localparam int unsigned CHIP_ID_W = 7;   // up to 128 nodes
  localparam int unsigned RING_W    = 8;   // Ring Size 1..128
  localparam int unsigned EVENT_W   = CHIP_ID_W + ADDR_W;

  typedef logic [PKT_W-1:0]     pkt_t;
  typedef logic [ADDR_W-1:0]    addr_t;
  typedef logic [CHIP_ID_W-1:0] chip_id_t;
  typedef logic [RING_W-1:0]    ring_size_t;
  typedef logic [EVENT_W-1:0]   event_t;

  typedef enum logic [2:0] {
    CTRL_IDLE   = 3'd0,
    CTRL_SYNC   = 3'd1,
    CTRL_START  = 3'd2,
    CTRL_FINISH = 3'd3
  } ctrl_e;

  function automatic pkt_t mk_data(addr_t a);
    return {1'b1, a};
  endfunction

  function automatic pkt_t mk_ctrl(ctrl_e c, chip_id_t id);
    return {1'b0, c, 5'd0, id};
  endfunction

  function automatic logic is_data(pkt_t p);
    return p[PKT_W-1];
  endfunction

  function automatic ctrl_e ctrl_of(pkt_t p);
    return ctrl_e'(p[14:12]);
  endfunction

  function automatic chip_id_t id_of(pkt_t p);
    return p[CHIP_ID_W-1:0];
  endfunction

  // Node-level status bundle brought out of the top.
  typedef struct packed {
    logic        aer_eo_exec;     // execution phase over (pulse)
    logic        aer_on;          // ring synchronised, ETP running
    logic        aer_done;        // all FINISH packets received
    logic        aer_eo_distrib;  // distribution phase over (pulse)
    logic        err_mismatch;    // last DP: own events sent != returned
    logic        err_overflow;    // a FIFO write was refused (sticky)
    logic [15:0] err_count;       // DPs with a mismatch
    logic [15:0] emu_cycles;      // completed emulation cycles
    logic [15:0] rx_events;       // events received in the last DP
  } node_status_t;

endpackage
