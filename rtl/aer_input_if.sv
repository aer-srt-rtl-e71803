// Input Interface of the AER-SRT network interface. During the execution
// phase (EP) it takes the events produced by the node's neural emulator and
// writes their addresses into the Input FIFO; when the emulator reports the
// end of the EP it issues a one-cycle AER_eo_exec pulse, which starts the
// ring synchronisation, and accepts no more events until AER_eo_distrib
// reports that the distribution phase (DP) is over.
//
// Interface: gen_valid/gen_addr carry one event per cycle; gen_ready is high
// while the EP is open. An event arriving while the Input FIFO is full is
// dropped and raises overflow (sticky until reset): the FIFO size bounds the
// spikes a node may produce per emulation cycle. eo_exec follows
// gen_eo_exec by one cycle, after the last event write. The EP/DP
// handshake follows the document; dropping on overflow is this design's
// choice.
module aer_input_if
  import aer_srt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  gen_valid,
  input  addr_t gen_addr,
  output logic  gen_ready,
  input  logic  gen_eo_exec,
  input  logic  eo_distrib,
  output logic  fifo_wr,
  output addr_t fifo_wdata,
  input  logic  fifo_full,
  output logic  eo_exec,
  output logic  overflow
);
  logic in_ep;

  assign gen_ready  = in_ep;
  assign fifo_wr    = in_ep && gen_valid && !fifo_full;
  assign fifo_wdata = gen_addr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_ep    <= 1'b1;
      eo_exec  <= 1'b0;
      overflow <= 1'b0;
    end else begin
      eo_exec <= 1'b0;
      if (in_ep && gen_valid && fifo_full) overflow <= 1'b1;
      if (in_ep && gen_eo_exec) begin
        in_ep   <= 1'b0;
        eo_exec <= 1'b1;
      end else if (!in_ep && eo_distrib) begin
        in_ep <= 1'b1;
      end
    end
  end
endmodule
