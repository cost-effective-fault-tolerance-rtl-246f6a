// ni_rx_check -- delivery checks in the network interface.
//
// Reads the fixed header fields of each packet delivered by the router: the
// destination node id and sequence number in flit 1, the source id, message tag
// and multipacket flag in flit 2.  A destination other than this node's id means
// the packet was misdelivered (for instance ejected early because of a header
// parity error) and pulses misdeliv.  When the packet ends, the checksum result
// arrives from ni_checksum; a packet that is correctly addressed and intact is
// reported on pkt_v with its fields, so the message tracker can account for it.
// Corrupted or misdelivered packets are not reported as arrivals: their missing
// sequence numbers will show up as holes.
//
// Interface: rx_v/rx_sop/rx_flit is the ejection flit stream (rx_sop on flit 0); the
// end of the packet is signalled by ni_checksum; csum_done/csum_err from ni_checksum (one cycle after
// rx_eop).  Timing: misdeliv one cycle after flit 1; pkt_v together with
// csum_done.  Follows the document: source and destination ids are required
// header fields and the network interface checks the destination.  Own choice:
// the field layout (see ft_pkg).
module ni_rx_check
  import ft_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] my_id,
  input  logic              rx_v,
  input  logic              rx_sop,
  input  logic [FLIT_W-1:0] rx_flit,
  input  logic              csum_done,
  input  logic              csum_err,
  output logic              misdeliv,
  output logic              pkt_v,
  output logic              pkt_multi,
  output logic [3:0]        pkt_tag,
  output logic [5:0]        pkt_seq,
  output logic [NODE_W-1:0] pkt_src
);

  logic [4:0] idx_q;        // flit index within the packet
  logic       bad_q;        // misdelivered

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx_q     <= '0;
      bad_q     <= 1'b0;
      misdeliv  <= 1'b0;
      pkt_multi <= 1'b0;
      pkt_tag   <= '0;
      pkt_seq   <= '0;
      pkt_src   <= '0;
    end else begin
      misdeliv <= 1'b0;
      if (rx_v) begin
        idx_q <= rx_sop ? 5'd1 : idx_q + 5'd1;
        if (rx_sop) bad_q <= 1'b0;
        if (!rx_sop && idx_q == 5'd1) begin
          pkt_seq <= rx_flit[5:0];
          if (rx_flit[15:6] != my_id) begin
            misdeliv <= 1'b1;
            bad_q    <= 1'b1;
          end
        end
        if (!rx_sop && idx_q == 5'd2) begin
          pkt_src   <= rx_flit[15:6];
          pkt_tag   <= rx_flit[5:2];
          pkt_multi <= rx_flit[1];
        end
      end
    end
  end

  assign pkt_v = csum_done && !csum_err && !bad_q;

endmodule
