// ft_pkg -- shared types and constants of the fault-tolerant Chaos router node.
//
// The router is a two-dimensional Chaos router with five channels: the positive
// and negative direction of X and Y plus the link to the processing node.  Every
// packet starts with one dynamic header flit holding the remaining X and Y
// displacement; the router reads only this flit, updates it by one hop on the way
// out and protects it with a single even-parity bit.  The five channels, the
// 16-bit flit and the 20-flit maximum packet follow the router this design
// extends; the bit positions of the header fields, the 7-bit displacement width
// and the network-interface header layout are this design's own choice.
//
// Header flit 0:   [15] parity  [14] reserved  [13:7] dx  [6:0] dy
//   dx, dy are signed two's complement hop counts still to travel.  Parity is
//   even over all 16 bits, so the XOR of the whole flit is 0 when it is intact.
// Header flit 1:   [15:6] destination node id  [5:0] packet sequence number
// Header flit 2:   [15:6] source node id  [5:2] message tag  [1] multipacket  [0] reserved
// Last two flits:  checksum high half, checksum low half (network interface only).
package ft_pkg;

  localparam int NCH     = 5;   // channels per router: X+, X-, Y+, Y-, processor
  localparam int NNB     = 4;   // network (neighbour) links
  localparam int FLIT_W  = 16;
  localparam int DISP_W  = 7;
  localparam int NODE_W  = 10;  // up to 1024 nodes
  localparam int MAX_FLITS = 20;

  // channel numbering
  localparam int unsigned CH_XP = 0;
  localparam int unsigned CH_XM = 1;
  localparam int unsigned CH_YP = 2;
  localparam int unsigned CH_YM = 3;
  localparam int unsigned CH_PN = 4;

  typedef logic [FLIT_W-1:0] flit_t;

  typedef struct packed {
    logic                     par;
    logic                     rsv;
    logic signed [DISP_W-1:0] dx;
    logic signed [DISP_W-1:0] dy;
  } hdr_t;

  // Fault-management states of the router (3 bits of state).
  typedef enum logic [2:0] {
    FM_NORMAL    = 3'd0,  // normal operation, listening for an error-detected eureka
    FM_ERR_PROP  = 3'd1,  // error detect propagate: short timed delay, EBN quiet
    FM_DRAIN     = 3'd2,  // system drain: barrier "no packet header present"
    FM_NET_CLEAR = 3'd3,  // network clear: EBN off for two hop delays
    FM_DROP      = 3'd4,  // drop packets after drain timeout
    FM_DECISION  = 3'd5,  // eureka window: run diagnostics?
    FM_DIAG      = 3'd6,  // diagnostics, timed
    FM_NORM_HOLD = 3'd7   // short quiet delay before normal operation
  } fm_state_t;

  // Router error flags reported privately to the processing node.
  localparam int NERR      = 6;
  localparam int E_PARITY  = 0;  // header parity error in an input frame
  localparam int E_LENGTH  = 1;  // packet longer than 20 flits
  localparam int E_PROTO   = 2;  // channel protocol violation
  localparam int E_OTIMEO  = 3;  // output frame waited too long for the channel
  localparam int E_DROP    = 4;  // packets dropped after the drain timeout
  localparam int E_CFG     = 5;  // configuration write outside the allowed states

  // Even parity bit over the 15 non-parity bits of a header flit.
  function automatic logic hdr_par(input hdr_t h);
    return ^{h.rsv, h.dx, h.dy};
  endfunction

endpackage
