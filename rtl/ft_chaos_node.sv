// ft_chaos_node -- fault-tolerance hardware of one node of a Chaos routing network.
//
// A Chaos router is a non-minimal adaptive packet router for 2-D meshes and tori:
// packets cut through to a profitable output when they can, wait in a central
// multiqueue when they cannot, and are derouted at random when the multiqueue
// fills.  This node adds to it a small amount of logic that detects faults,
// drives a network-wide fault-management procedure over a one-wire broadcast
// network, and routes around components the processing node has declared dead:
//
//   detection in the router   header parity check per input frame (hdr_parity),
//                             packet length check (flit_counter), output frame
//                             wait timeout (out_timeout), channel control
//                             context check (chan_protocol_checker);
//   reporting                 sticky flags read by the processing node
//                             (err_report); the processing node decides whether
//                             to broadcast an error-detected eureka;
//   synchronisation           Express Broadcast Network node (ebn_node) and the
//                             fault-management state machine (fm_controller):
//                             eureka -> system drain barrier -> (drop packets)
//                             -> decision -> diagnostics -> normal;
//   drain support             drain timeout (drain_timeout), two-phase packet
//                             removal (drop_logic);
//   reconfiguration           configuration register (config_reg) and the
//                             modified routing decision per input frame
//                             (route_decision: functional mask, No Routeback,
//                             fast derouting, local delivery of bad headers);
//                             header update with parity regeneration per output
//                             frame (hdr_update);
//   network interface         end-to-end checksum (ni_checksum), destination
//                             check (ni_rx_check), lost/duplicate/late packet
//                             tracking for multipacket messages (ni_msg_tracker).
//
// The basic router datapath (frames, crossbar, multiqueue, channel arbitration)
// and the processing node are not part of this module: their signals are ports.
// Channel index c follows ft_pkg (0 X+, 1 X-, 2 Y+, 3 Y-, 4 processor link).
// Per-channel strobes (hdr_v, rx_flit_v, tx_start, rem_start) are one-cycle
// pulses; levels (of_wait, we_own, rem_want, rem_ifree, loc_ifree, hdr_present,
// mq_valid, of_valid) are the datapath's current state.
// Configuration writes are accepted while pn_init is high (system start-up) or
// in the Diagnostics state.  All parameters of the sub-blocks keep the values of
// the design this node is modelled on (see each block).
module ft_chaos_node
  import ft_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  // Express Broadcast Network wires to the four neighbours
  input  logic [NNB-1:0]            ebn_in,
  output logic [NNB-1:0]            ebn_out,
  // processing node: EBN wire, state, configuration, error report
  input  logic                      pn_ebn_in,
  output logic                      pn_ebn_out,
  output fm_state_t                 fm_state,
  input  logic                      pn_init,
  input  logic                      cfg_wr,
  input  logic [8:0]                cfg_wdata,
  output logic [NCH-1:0]            link_ok,
  output logic [NNB-1:0]            node_ok,
  input  logic                      dto_wr,
  input  logic [19:0]               dto_wdata,
  input  logic                      oto_wr,
  input  logic [7:0]                oto_wdata,
  input  logic [NERR-1:0]           err_clr,
  output logic [NERR-1:0]           err_flags,
  output logic                      err_any,
  output logic [3:0]                dropped,
  // router datapath: input frames
  input  logic [NCH-1:0]            hdr_v,
  input  logic [NCH-1:0][FLIT_W-1:0] hdr_flit,
  output logic [NCH-1:0][NCH-1:0]   route,
  output logic [NCH-1:0]            eject,
  output logic [NCH-1:0]            fast_deroute,
  output logic [NCH-1:0]            mq_inhibit,
  input  logic [NCH-1:0]            rx_flit_v,
  input  logic [NCH-1:0]            rx_eom,
  output logic [NCH-1:0]            rx_abort,
  // router datapath: output frames and channel control
  input  logic [NCH-1:0][FLIT_W-1:0] upd_in,
  output logic [NCH-1:0][FLIT_W-1:0] upd_out,
  input  logic [NCH-1:0]            of_wait,
  input  logic [NCH-1:0]            we_own,
  input  logic [NCH-1:0]            rem_want,
  input  logic [NCH-1:0]            rem_ifree,
  input  logic [NCH-1:0]            tx_start,
  input  logic [NCH-1:0]            rem_start,
  input  logic [NCH-1:0]            loc_ifree,
  // router datapath: drain and drop
  input  logic                      hdr_present,
  input  logic [4:0]                mq_valid,
  input  logic [NCH-1:0]            of_valid,
  output logic [4:0]                mq_clr,
  output logic [NCH-1:0]            of_clr,
  // network interface
  input  logic [NODE_W-1:0]         my_id,
  input  logic                      ej_v,
  input  logic                      ej_sop,
  input  logic                      ej_eop,
  input  logic [FLIT_W-1:0]         ej_flit,
  input  logic                      inj_v,
  input  logic                      inj_sop,
  input  logic [FLIT_W-1:0]         inj_flit,
  output logic [31:0]               inj_csum,
  input  logic                      msg_open,
  input  logic [3:0]                msg_open_tag,
  input  logic [6:0]                msg_open_npk,
  input  logic                      msg_close,
  input  logic [3:0]                msg_close_tag,
  input  logic                      wd_wr,
  input  logic [15:0]               wd_wdata,
  output logic                      ni_misdeliv,
  output logic                      ni_csum_err,
  output logic                      ni_pkt_v,
  output logic                      msg_done,
  output logic [3:0]                msg_done_tag,
  output logic                      msg_err_dup,
  output logic                      msg_err_extra,
  output logic                      msg_err_late,
  output logic [3:0]                msg_err_tag,
  output logic [15:0]               msg_busy
);

  // ---------------- fault management and EBN ----------------
  logic heard, ebn_drive, ebn_listen;
  logic drain_run, drain_start, drain_expired;
  logic force_eject, drop_clear, eject_all, drop_evt;

  ebn_node u_ebn (
    .clk, .rst_n, .ebn_in, .pn_in(pn_ebn_in), .listen(ebn_listen), .drive(ebn_drive),
    .ebn_out, .pn_out(pn_ebn_out), .heard
  );

  fm_controller u_fm (
    .clk, .rst_n, .heard, .hdr_present, .drain_expired,
    .state(fm_state), .ebn_drive, .ebn_listen, .drain_run, .drain_start,
    .force_eject, .drop_clear
  );

  drain_timeout u_dto (
    .clk, .rst_n, .start(drain_start), .run(drain_run),
    .lim_wr(dto_wr), .lim_wdata(dto_wdata), .expired(drain_expired)
  );

  drop_logic u_drop (
    .clk, .rst_n, .phase1(force_eject), .clear(drop_clear), .mq_valid, .of_valid,
    .eject_all, .mq_clr, .of_clr, .dropped, .drop_evt
  );

  // ---------------- configuration ----------------
  logic cfg_rej;

  config_reg u_cfg (
    .clk, .rst_n, .wr(cfg_wr), .wr_allow(pn_init || fm_state == FM_DIAG),
    .wdata(cfg_wdata), .link_ok, .node_ok, .wr_rej(cfg_rej)
  );

  // ---------------- input frames ----------------
  logic [NCH-1:0] par_err, len_err, proto_err, oto_err;

  hdr_parity u_par (.hdr_v, .hdr_flit, .par_err);

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    route_decision #(.ARR_CH(c)) u_rt (
      .hdr_flit(hdr_flit[c]), .par_err(par_err[c]), .link_ok(link_ok[NNB-1:0]),
      .force_eject(eject_all), .route(route[c]), .eject(eject[c]),
      .fast_deroute(fast_deroute[c]), .mq_inhibit(mq_inhibit[c])
    );

    flit_counter u_fc (
      .clk, .rst_n, .flit_v(rx_flit_v[c]), .eom(rx_eom[c]), .cnt(),
      .abort(rx_abort[c]), .err(len_err[c])
    );

    hdr_update u_upd (.hdr_in(upd_in[c]), .dir(3'(c)), .hdr_out(upd_out[c]));

    chan_protocol_checker u_pc (
      .clk, .rst_n, .we_own(we_own[c]), .rem_want(rem_want[c]), .rem_ifree(rem_ifree[c]),
      .tx_start(tx_start[c]), .rem_start(rem_start[c]), .loc_ifree(loc_ifree[c]),
      .err(proto_err[c]), .err_code()
    );
  end

  out_timeout u_oto (
    .clk, .rst_n, .of_wait, .lim_wr(oto_wr), .lim_wdata(oto_wdata), .err(oto_err)
  );

  // ---------------- error report to the processing node ----------------
  logic [NERR-1:0] evt;

  always_comb begin
    evt           = '0;
    evt[E_PARITY] = |par_err;
    evt[E_LENGTH] = |len_err;
    evt[E_PROTO]  = |proto_err;
    evt[E_OTIMEO] = |oto_err;
    evt[E_DROP]   = drop_evt;
    evt[E_CFG]    = cfg_rej;
  end

  err_report #(.NERR(NERR)) u_err (
    .clk, .rst_n, .evt, .clr(err_clr), .flags(err_flags), .any(err_any)
  );

  // ---------------- network interface ----------------
  logic csum_done;
  logic ni_csum_err_lvl;

  ni_checksum u_csum (
    .clk, .rst_n,
    .tx_v(inj_v), .tx_sop(inj_sop), .tx_flit(inj_flit), .tx_sum(inj_csum),
    .rx_v(ej_v), .rx_sop(ej_sop), .rx_eop(ej_eop), .rx_flit(ej_flit),
    .rx_done(csum_done), .rx_err(ni_csum_err_lvl)
  );

  assign ni_csum_err = csum_done && ni_csum_err_lvl;

  logic       pkt_multi;
  logic [3:0] pkt_tag;
  logic [5:0] pkt_seq;

  ni_rx_check u_rxc (
    .clk, .rst_n, .my_id, .rx_v(ej_v), .rx_sop(ej_sop), .rx_flit(ej_flit),
    .csum_done, .csum_err(ni_csum_err_lvl), .misdeliv(ni_misdeliv),
    .pkt_v(ni_pkt_v), .pkt_multi, .pkt_tag, .pkt_seq, .pkt_src()
  );

  ni_msg_tracker u_trk (
    .clk, .rst_n,
    .open(msg_open), .open_tag(msg_open_tag), .open_npk(msg_open_npk),
    .close(msg_close), .close_tag(msg_close_tag),
    .wd_wr, .wd_wdata,
    .pkt_v(ni_pkt_v && pkt_multi), .pkt_tag, .pkt_seq,
    .done(msg_done), .done_tag(msg_done_tag), .err_dup(msg_err_dup),
    .err_extra(msg_err_extra), .err_late(msg_err_late), .err_tag(msg_err_tag),
    .busy(msg_busy)
  );

endmodule
