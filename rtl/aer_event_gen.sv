// Event Generator/Consumer: stands in for the neuron and synapse emulation
// array of a node, to exercise and benchmark the ring. It runs emulation
// cycles back to back while run is high. Each cycle has an execution phase
// (EP) that lasts max(spikes, exec_cycles) clock cycles, during which it
// emits `spikes` events, one per clock, then pulses eo_exec; it then waits
// for eo_distrib (end of the distribution phase) while counting the events
// the ring delivers to it (all, and those carrying its own Chip Id), and starts the next cycle.
//
// Event addresses are {emulation cycle number [3:0], spike index [10:0]},
// so every event of a cycle is distinct. The traffic load is set per node
// through `spikes` and `exec_cycles`, as the document asks of this block;
// the address pattern and the counters are this design's choice.
module aer_event_gen
  import aer_srt_pkg::*;
#(
  parameter int unsigned SPIKE_CNT_W = 11
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   run,
  input  logic [SPIKE_CNT_W-1:0] spikes,
  input  logic [15:0]            exec_cycles,
  output logic                   ev_valid,
  output addr_t                  ev_addr,
  input  logic                   ev_ready,
  output logic                   eo_exec,
  input  logic                   eo_distrib,
  input  logic                   rx_valid,
  input  event_t                 rx_event,
  input  chip_id_t               chip_id,
  output logic [15:0]            emu_cycles,
  output logic [15:0]            last_own_count,
  output logic [15:0]            rx_count,
  output logic [15:0]            last_rx_count
);
  typedef enum logic [1:0] {G_IDLE, G_EXEC, G_DIST} gstate_e;
  gstate_e                state;
  logic [SPIKE_CNT_W-1:0] k;
  logic [15:0]            t;
  logic                   ep_end;
  logic [15:0]            own_count;
  logic                   rx_own;

  assign rx_own   = rx_valid && (rx_event[EVENT_W-1 -: CHIP_ID_W] == chip_id);

  assign ev_valid = (state == G_EXEC) && (k < spikes) && ev_ready;
  assign ev_addr  = {emu_cycles[3:0], k[10:0]};
  assign ep_end   = (state == G_EXEC) && (k >= spikes) && (t >= exec_cycles);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= G_IDLE;
      k             <= '0;
      t             <= '0;
      eo_exec       <= 1'b0;
      emu_cycles    <= '0;
      rx_count      <= '0;
      last_rx_count <= '0;
      own_count     <= '0;
      last_own_count <= '0;
    end else begin
      eo_exec <= 1'b0;
      if (rx_valid) rx_count <= rx_count + 1'b1;
      if (rx_own)   own_count <= own_count + 1'b1;
      unique case (state)
        G_IDLE: if (run && ev_ready) begin
          state <= G_EXEC;
          k     <= '0;
          t     <= '0;
        end
        G_EXEC: begin
          if (t != 16'hffff) t <= t + 1'b1;
          if (ev_valid) k <= k + 1'b1;
          if (ep_end) begin
            eo_exec <= 1'b1;
            state   <= G_DIST;
          end
        end
        G_DIST: if (eo_distrib) begin
          emu_cycles    <= emu_cycles + 1'b1;
          last_rx_count <= rx_count + (rx_valid ? 16'd1 : 16'd0);
          rx_count      <= '0;
          last_own_count <= own_count + (rx_own ? 16'd1 : 16'd0);
          own_count     <= '0;
          state         <= G_IDLE;
        end
        default: state <= G_IDLE;
      endcase
    end
  end
endmodule
