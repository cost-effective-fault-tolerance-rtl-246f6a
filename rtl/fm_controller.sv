// fm_controller -- router fault-management state machine, synchronised by the EBN.
//
// Every router runs the same sequence; the one-wire EBN keeps them in step.  A
// broadcast started anywhere reaches a router after a phase delay that grows with
// distance, so every decision made on the EBN waits long enough for the slowest
// router to answer (two Network Delays), and every hand-over between two uses of
// the EBN keeps the wire quiet long enough for neighbours with a trailing phase
// to catch up.  The states (ft_pkg::fm_state_t):
//
//   NORMAL     listening.  Any assertion (an error-detected eureka from the local
//              processing node or from a neighbour) is re-driven for one cycle
//              and moves the router to ERR_PROP: an untimed transition.
//   ERR_PROP   EBN off for EP_DELAY = 3 hop delays so the eureka wavefront has
//              passed, then a timed move to DRAIN.  Clears the drain timeout.
//   DRAIN      barrier "no packet header left": the router asserts the EBN from
//              the first cycle a header is present until the end of the window,
//              and re-drives (and remembers) anything it hears.  After two
//              Network Delays: EBN seen -> NET_CLEAR, not seen -> DECISION.
//   NET_CLEAR  EBN off for two hop delays, then DRAIN again (the barrier loop).
//   DROP       entered from DRAIN/NET_CLEAR when the drain timeout expires.  For
//              DROP_TIME-1 cycles every packet is delivered locally (force_eject),
//              then one drop_clear pulse removes what is stuck; timed move to
//              DECISION.
//   DECISION   eureka window of two Network Delays: a processing node that wants
//              diagnostics asserts its EBN wire.  Seen -> DIAG, else NORM_HOLD.
//   DIAG       diagnostics run by the processing nodes for DIAG_TIME cycles, EBN
//              off, then NORM_HOLD.
//   NORM_HOLD  EBN off for two hop delays, then NORMAL.
//
// Interface: heard from ebn_node (its listen is ebn_listen), drive ebn_drive into
// ebn_node's output register; hdr_present from the router datapath; drain_*
// connect to drain_timeout; force_eject/drop_clear to drop_logic.
// Timing: one hop of the EBN is HOP_DELAY = 2 cycles (input latch + output
// register).  NET_DELAY2 is the two-Network-Delay wait, in cycles.
// Follows the document: the states and transitions of its state diagram, the
// two-Network-Delay windows, the two-hop-delay Network Clear, 3 bits of state and
// an 8-bit delay counter of 2 x 5 x 16 = 160.  Own choices: the ERR_PROP and
// NORM_HOLD lengths, the one-cycle eureka pulse, DROP_TIME and DIAG_TIME and the
// separate 12-bit counter that times them (the document gives no durations).
module fm_controller
  import ft_pkg::*;
#(
  parameter int NET_DELAY2 = 160,
  parameter int DLY_W      = 8,
  parameter int HOP_DELAY  = 2,
  parameter int DROP_TIME  = 300,
  parameter int DIAG_TIME  = 4000,
  parameter int PH_W       = 12
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      heard,
  input  logic      hdr_present,
  input  logic      drain_expired,
  output fm_state_t state,
  output logic      ebn_drive,
  output logic      ebn_listen,
  output logic      drain_run,
  output logic      drain_start,
  output logic      force_eject,
  output logic      drop_clear
);

  localparam int EP_DELAY   = 3 * HOP_DELAY;
  localparam int NC_DELAY   = 2 * HOP_DELAY;
  localparam int HOLD_DELAY = 2 * HOP_DELAY;

  fm_state_t        state_q, state_d;
  logic [DLY_W-1:0] dly_q, dly_d;
  logic [PH_W-1:0]  ph_q, ph_d;
  logic             seen_q, seen_d;
  logic             assert_now;

  // EBN asserted (heard or driven locally) in the barrier / eureka windows
  always_comb begin
    unique case (state_q)
      FM_DRAIN:    assert_now = seen_q | heard | hdr_present;
      FM_DECISION: assert_now = seen_q | heard;
      default:     assert_now = 1'b0;
    endcase
  end

  always_comb begin
    state_d = state_q;
    dly_d   = (dly_q != '0) ? dly_q - DLY_W'(1) : dly_q;
    ph_d    = (ph_q  != '0) ? ph_q  - PH_W'(1)  : ph_q;
    seen_d  = assert_now;
    unique case (state_q)
      FM_NORMAL: begin
        if (heard) begin
          state_d = FM_ERR_PROP;
          dly_d   = DLY_W'(EP_DELAY - 1);
        end
      end
      FM_ERR_PROP: begin
        if (dly_q == '0) begin
          state_d = FM_DRAIN;
          dly_d   = DLY_W'(NET_DELAY2 - 1);
        end
      end
      FM_DRAIN: begin
        if (drain_expired) begin
          state_d = FM_DROP;
          ph_d    = PH_W'(DROP_TIME - 1);
        end else if (dly_q == '0) begin
          state_d = assert_now ? FM_NET_CLEAR : FM_DECISION;
          dly_d   = assert_now ? DLY_W'(NC_DELAY - 1) : DLY_W'(NET_DELAY2 - 1);
          seen_d  = 1'b0;
        end
      end
      FM_NET_CLEAR: begin
        if (drain_expired) begin
          state_d = FM_DROP;
          ph_d    = PH_W'(DROP_TIME - 1);
        end else if (dly_q == '0) begin
          state_d = FM_DRAIN;
          dly_d   = DLY_W'(NET_DELAY2 - 1);
        end
      end
      FM_DROP: begin
        if (ph_q == '0) begin
          state_d = FM_DECISION;
          dly_d   = DLY_W'(NET_DELAY2 - 1);
        end
      end
      FM_DECISION: begin
        if (dly_q == '0) begin
          state_d = assert_now ? FM_DIAG : FM_NORM_HOLD;
          ph_d    = PH_W'(DIAG_TIME - 1);
          dly_d   = DLY_W'(HOLD_DELAY - 1);
          seen_d  = 1'b0;
        end
      end
      FM_DIAG: begin
        if (ph_q == '0) begin
          state_d = FM_NORM_HOLD;
          dly_d   = DLY_W'(HOLD_DELAY - 1);
        end
      end
      FM_NORM_HOLD: begin
        if (dly_q == '0) state_d = FM_NORMAL;
      end
      default: state_d = FM_NORMAL;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= FM_NORMAL;
      dly_q   <= '0;
      ph_q    <= '0;
      seen_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      dly_q   <= dly_d;
      ph_q    <= ph_d;
      seen_q  <= seen_d;
    end
  end

  assign state       = state_q;
  assign ebn_listen  = (state_q == FM_NORMAL) || (state_q == FM_DRAIN) || (state_q == FM_DECISION);
  assign ebn_drive   = (state_q == FM_NORMAL) ? heard : assert_now;
  assign drain_run   = (state_q == FM_DRAIN) || (state_q == FM_NET_CLEAR);
  assign drain_start = (state_q == FM_ERR_PROP);
  assign force_eject = (state_q == FM_DROP) && (ph_q != '0);
  assign drop_clear  = (state_q == FM_DROP) && (ph_q == '0);

  // the two-Network-Delay window must fit the delay counter
  initial assert (NET_DELAY2 <= (1 << DLY_W) && DROP_TIME <= (1 << PH_W) && DIAG_TIME <= (1 << PH_W))
    else $error("fm_controller: delay does not fit its counter");

endmodule
