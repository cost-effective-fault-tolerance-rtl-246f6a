// drain_timeout -- system drain timeout counter.
//
// A drain normally ends when the EBN barrier finds no packet header left in any
// router.  In a faulty network some packets cannot be delivered, so the drain
// is bounded: this counter counts the cycles of the drain (System Drain and
// Network Clear states) and raises expired when it reaches the limit held in a
// 20-bit register that the processing node may rewrite.  The reset limit is the
// pessimistic bound for a full 1024-node network whose packets all go to one
// node: 1024 nodes x 15 packets x 20 cycles = 307200 cycles.
//
// Interface: start clears the count, run lets it count, lim_wr/lim_wdata write
// the limit, expired is a level that holds until start.
// Timing: expired rises in the cycle after the limit-th counted cycle.
// Follows the document: 20-bit counter and 20-bit register, bound of 307200.
module drain_timeout #(
  parameter int CNT_W     = 20,
  parameter int LIMIT_RST = 307200
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             run,
  input  logic             lim_wr,
  input  logic [CNT_W-1:0] lim_wdata,
  output logic             expired
);

  logic [CNT_W-1:0] limit_q, cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) limit_q <= CNT_W'(LIMIT_RST);
    else if (lim_wr) limit_q <= lim_wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      cnt_q <= '0;
    end else if (run && cnt_q != limit_q) begin
      cnt_q <= cnt_q + CNT_W'(1);
    end
  end

  assign expired = (cnt_q == limit_q);

endmodule
