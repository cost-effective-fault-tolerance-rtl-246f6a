// ni_checksum -- end-to-end checksum of the static packet flits (network interface).
//
// Flits other than the first are never changed by routers, but with virtual
// cut-through a packet is spread over several routers, so an error found in one
// of them could not be acted on any more.  The static flits are therefore checked
// only at the destination, by a checksum: the sum modulo 2^32 of all static flits
// (every flit after the first), carried as two extra flits at the end of the
// packet, high half first.  The same adder/accumulator serves both directions:
//
//   transmit  tx_v/tx_sop/tx_flit is the packet being injected, without its
//             checksum.  tx_sum is the running sum including the flit on tx_flit
//             this cycle, so on the last data flit it is the value to append.
//   receive   rx_* is the packet being delivered, checksum flits included
//             (rx_eop on the low checksum flit).  Two flits are held back in a
//             small pipeline so that the sum stops short of the checksum flits;
//             at rx_eop the sum is compared with them.  rx_done pulses with the
//             result on rx_err.
//
// Timing: tx_sum is combinational; rx_done/rx_err are registered, one cycle after
// rx_eop.  Follows the document: modulo-2^32 checksum, two flits, computed as the
// packet streams through an adder/accumulator.  Own choice: which flits are
// summed (all after the first), the order of the two checksum flits.
module ni_checksum
  import ft_pkg::*;
#(
  parameter int CSUM_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // transmit side
  input  logic              tx_v,
  input  logic              tx_sop,
  input  logic [FLIT_W-1:0] tx_flit,
  output logic [CSUM_W-1:0] tx_sum,
  // receive side
  input  logic              rx_v,
  input  logic              rx_sop,
  input  logic              rx_eop,
  input  logic [FLIT_W-1:0] rx_flit,
  output logic              rx_done,
  output logic              rx_err
);

  // ---------------- transmit ----------------
  logic [CSUM_W-1:0] tx_acc_q;

  always_comb begin
    tx_sum = tx_acc_q;
    if (tx_v) tx_sum = tx_sop ? '0 : tx_acc_q + CSUM_W'(tx_flit);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    tx_acc_q <= '0;
    else if (tx_v) tx_acc_q <= tx_sum;
  end

  // ---------------- receive -----------------
  logic [CSUM_W-1:0] rx_acc_q, rx_total;
  logic [FLIT_W-1:0] p1_q, p2_q;    // last and second-to-last static flit
  logic              p1_v, p2_v;

  assign rx_total = rx_acc_q + (p2_v ? CSUM_W'(p2_q) : '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_acc_q <= '0;
      p1_q <= '0;  p2_q <= '0;
      p1_v <= 1'b0; p2_v <= 1'b0;
      rx_done <= 1'b0;
      rx_err  <= 1'b0;
    end else begin
      rx_done <= 1'b0;
      if (rx_v) begin
        if (rx_sop) begin
          // the dynamic header flit is not summed
          rx_acc_q <= '0;
          p1_v <= 1'b0; p2_v <= 1'b0;
        end else begin
          rx_acc_q <= rx_total;
          p2_q <= p1_q;   p2_v <= p1_v;
          p1_q <= rx_flit; p1_v <= 1'b1;
        end
        if (rx_eop) begin
          rx_done <= 1'b1;
          rx_err  <= !p1_v || (rx_total != {p1_q, rx_flit});
        end
      end
    end
  end

endmodule
