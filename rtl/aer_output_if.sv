// Output Interface of the AER-SRT network interface. It hands the node's
// consumer every event distributed over the ring in the current
// distribution phase (DP), each as {source Chip Id, address}, including the
// node's own events when they come back, and marks the end of the DP with a
// one-cycle AER_eo_distrib pulse, after which the next execution phase may
// begin. It also counts the events of each DP (dp_events, valid from
// AER_eo_distrib on).
//
// Timing: one register stage. out_valid/out_event follow ev_valid/ev_data by
// one cycle; eo_distrib follows the done strobe by one cycle, so it always
// comes after the last event of the DP. Events are streamed as they arrive
// rather than buffered to the end of the DP (this design's choice); the
// consumer must take one event per cycle.
module aer_output_if
  import aer_srt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ev_valid,
  input  event_t      ev_data,
  input  logic        done_pulse,
  output logic        out_valid,
  output event_t      out_event,
  output logic        eo_distrib,
  output logic [15:0] dp_events
);
  logic [15:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_event  <= '0;
      eo_distrib <= 1'b0;
      cnt        <= '0;
      dp_events  <= '0;
    end else begin
      out_valid  <= ev_valid;
      out_event  <= ev_data;
      eo_distrib <= done_pulse;
      if (done_pulse) begin
        dp_events <= cnt + (ev_valid ? 16'd1 : 16'd0);
        cnt       <= '0;
      end else if (ev_valid) begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
