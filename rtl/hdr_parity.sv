// hdr_parity -- header parity checker for the input frames of the router.
//
// Only the first flit of a packet, holding the X and Y displacement, is read and
// changed by routers, so only it is protected here (the static flits are covered
// end to end by the network-interface checksum).  Each input frame has its own
// checker: a four-level XOR tree (16 -> 8 -> 4 -> 2 -> 1, 15 two-input XORs)
// over the whole header flit, parity bit included.  With even parity the result is
// 0 for an intact header; a 1 raises par_err for that frame, which makes the
// routing decision deliver the packet to the local processing node at once.
//
// Interface: hdr_v/hdr_flit per input frame, par_err per frame (hdr_v gated).
// Timing: purely combinational, within the header decode cycle.
// Follows the document: one parity bit, a four-level XOR tree, one per channel.
// Own choice: even parity over the full flit.
module hdr_parity
  import ft_pkg::*;
#(
  parameter int NCH_P = NCH
) (
  input  logic [NCH_P-1:0]             hdr_v,
  input  logic [NCH_P-1:0][FLIT_W-1:0] hdr_flit,
  output logic [NCH_P-1:0]             par_err
);

  for (genvar c = 0; c < NCH_P; c++) begin : g_ch
    logic [7:0] l1;
    logic [3:0] l2;
    logic [1:0] l3;
    logic       l4;
    always_comb begin
      for (int i = 0; i < 8; i++) l1[i] = hdr_flit[c][2*i] ^ hdr_flit[c][2*i+1];
      for (int i = 0; i < 4; i++) l2[i] = l1[2*i] ^ l1[2*i+1];
      for (int i = 0; i < 2; i++) l3[i] = l2[2*i] ^ l2[2*i+1];
      l4 = l3[0] ^ l3[1];
      par_err[c] = hdr_v[c] & l4;
    end
  end

endmodule
