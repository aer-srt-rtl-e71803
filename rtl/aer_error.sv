// AER_error: error detection by construction of the ring. Every packet a
// node sends travels the whole ring and comes back to it, so the node counts
// the events it wrote into its Input FIFO during the execution phase and the
// data packets that return carrying its own Chip Id. At AER_done the two
// counts are compared: a difference sets err_mismatch (held until the next
// comparison) and increments err_count; then both counts restart.
//
// Counting Input FIFO writes against own returned packets follows the error
// control description; the counter width and sticky count are this design's
// choice. Detection only: no correction.
module aer_error #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sent,       // event written into the Input FIFO
  input  logic             returned,   // own data packet received from the ring
  input  logic             aer_done,   // one-cycle strobe: DP over
  output logic             err_mismatch,
  output logic [15:0]      err_count,
  output logic [CNT_W-1:0] sent_cnt,
  output logic [CNT_W-1:0] ret_cnt
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sent_cnt     <= '0;
      ret_cnt      <= '0;
      err_mismatch <= 1'b0;
      err_count    <= '0;
    end else if (aer_done) begin
      err_mismatch <= (sent_cnt != ret_cnt);
      if (sent_cnt != ret_cnt) err_count <= err_count + 1'b1;
      sent_cnt <= sent ? CNT_W'(1) : '0;
      ret_cnt  <= returned ? CNT_W'(1) : '0;
    end else begin
      if (sent)     sent_cnt <= sent_cnt + 1'b1;
      if (returned) ret_cnt  <= ret_cnt + 1'b1;
    end
  end
endmodule
