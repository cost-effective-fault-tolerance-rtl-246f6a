// hdr_update -- header update of a packet leaving the router.
//
// The displacement fields count the hops still to go.  When the header flit
// leaves through an X or Y link, the matching field moves one step toward zero if
// the hop is profitable and one step away from zero if it is a deroute: leaving
// on X+ always subtracts one from dx, leaving on X- always adds one, and the same
// for Y.  A packet delivered to the processing node is not changed.  The parity
// bit is then regenerated from the new fields.  As the document points out, this
// means a header that arrived corrupted but was derouted before it could be
// delivered leaves with parity that matches its corrupt contents; the router
// deliberately does not poison the parity.
//
// Interface: hdr_in, dir (output channel, ft_pkg CH_* numbering), hdr_out.
// Timing: combinational.
// Follows the document: increment/decrement per hop, fresh parity on update.
// Own choice: field layout from ft_pkg; displacement wraps silently at +-64.
module hdr_update
  import ft_pkg::*;
(
  input  logic [FLIT_W-1:0] hdr_in,
  input  logic [2:0]        dir,
  output logic [FLIT_W-1:0] hdr_out
);

  hdr_t h;

  always_comb begin
    h = hdr_t'(hdr_in);
    unique case (dir)
      3'(CH_XP): h.dx = h.dx - DISP_W'(1);
      3'(CH_XM): h.dx = h.dx + DISP_W'(1);
      3'(CH_YP): h.dy = h.dy - DISP_W'(1);
      3'(CH_YM): h.dy = h.dy + DISP_W'(1);
      default:   ;
    endcase
    h.par   = hdr_par(h);
    hdr_out = FLIT_W'(h);
  end

endmodule
