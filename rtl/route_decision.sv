// route_decision -- routing decision for the packet in one input frame.
//
// The basic Chaos router lists the profitable directions from the sign of the
// header's displacement fields.  The fault-tolerant router adds, in order:
//   1. immediate delivery: a header with a parity error, a packet already at its
//      destination, or any packet while the drop phase forces local delivery, is
//      sent to the processing node (bit CH_PN of route).  A parity-error packet
//      is also kept out of the multiqueue (mq_inhibit), so it cannot be derouted
//      while it waits for the delivery channel;
//   2. the profitable list is ANDed with the functional channel mask written by
//      the processing node into the configuration register;
//   3. No Routeback: the link the packet arrived on is removed from the list,
//      unless it is the only functional link of the router;
//   4. fast derouting: if no profitable functional link remains, the list becomes
//      the functional mask (again with No Routeback), so the packet leaves by a
//      non-minimal link at once instead of waiting in the multiqueue for an
//      ordinary deroute.  Fast derouting never delivers to the processing node.
// The selection among the listed channels and the multiqueue are the basic
// router's and are outside this block.
//
// Interface: ARR_CH is the channel of the input frame this instance serves
// (CH_PN for the injection frame, which has no routeback direction).  route is a
// 5-bit candidate mask; eject, fast_deroute and mq_inhibit qualify it.  A packet
// with no functional link at all gets an empty list and waits in the multiqueue.
// Timing: combinational, in the header decode cycle.
// Follows the document: the mask AND, No Routeback, fast derouting, eject on
// parity error and in the drop phase.  Own choice: treatment of an empty mask.
module route_decision
  import ft_pkg::*;
#(
  parameter int unsigned ARR_CH = CH_PN
) (
  input  logic [FLIT_W-1:0] hdr_flit,
  input  logic              par_err,
  input  logic [NNB-1:0]    link_ok,
  input  logic              force_eject,
  output logic [NCH-1:0]    route,
  output logic              eject,
  output logic              fast_deroute,
  output logic              mq_inhibit
);

  hdr_t           h;
  logic [NNB-1:0] prof, pf, nr, fl;
  logic           at_dest;

  always_comb begin
    h          = hdr_t'(hdr_flit);
    prof[CH_XP] = (h.dx > 0);
    prof[CH_XM] = (h.dx < 0);
    prof[CH_YP] = (h.dy > 0);
    prof[CH_YM] = (h.dy < 0);
    at_dest    = (h.dx == 0) && (h.dy == 0);
    nr         = '0;
    if (ARR_CH < NNB) nr[ARR_CH[1:0]] = 1'b1;

    // profitable AND functional, then No Routeback
    pf = prof & link_ok;
    if ((link_ok & ~nr) != '0) pf = pf & ~nr;
    // fast derouting list: functional mask with No Routeback
    fl = link_ok;
    if ((link_ok & ~nr) != '0) fl = fl & ~nr;

    route        = '0;
    eject        = 1'b0;
    fast_deroute = 1'b0;
    mq_inhibit   = par_err;
    if (par_err || force_eject || at_dest) begin
      eject         = 1'b1;
      route[CH_PN]  = 1'b1;
    end else if (pf != '0) begin
      route[NNB-1:0] = pf;
    end else begin
      route[NNB-1:0] = fl;
      fast_deroute   = (fl != '0);
    end
  end

endmodule
