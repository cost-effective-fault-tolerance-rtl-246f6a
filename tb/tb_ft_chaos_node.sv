// tb_ft_chaos_node -- end-to-end test of the fault-tolerant router node.
//
// Nine ft_chaos_node instances with their default parameters form a 3x3 mesh.
// Their Express Broadcast Network (EBN) wires are connected between neighbours,
// and the link between nodes 7 and 8 is broken in both directions.  The testbench
// plays the nine processing nodes and the router datapaths.  Every mechanism is
// made to happen at least once and counted, and the run fails if any count is
// zero.
//   Phase 1, normal operation on node 4:
//     - header update on every output frame
//     - profitable routing, No Routeback with fast deroute, eject at the destination
//     - parity error (eject and no multiqueue), flit-count overflow
//     - channel protocol error and output-frame timeout
//     - a configuration write rejected outside diagnostics
//     - the network interface: checksum, good and corrupted packets, misdelivery,
//       and the message tracker (completion, duplicate, extra, watchdog late)
//   Phase 2, fault round with diagnostics:
//     - node 8's processing node raises an error eureka
//     - the arrival time at each node is checked against 2 cycles per EBN hop,
//       with the broken link routed around
//     - node 4 holds a packet header present, so the barrier forces one
//       network-clear loop
//     - the network clears and DECISION is reached
//     - node 4's processing node raises a diagnostics eureka, so every node
//       enters DIAG for 4000 cycles
//     - node 4 writes its configuration (link mask) during DIAG; with one
//       functional link the arrival link may be used again
//     - every node returns to normal
//   Phase 3, drop round:
//     - the drain timeout is programmed to 600 cycles
//     - node 4 keeps a header present, so the drain never completes
//     - every node times out into DROP and force-ejects for 299 cycles
//     - node 4 clears its buffers and reports how many were dropped
//     - every node returns to normal
// State dwell times (ERR_PROP 6, NET_CLEAR 4, DRAIN and DECISION windows 160,
// DIAG 4000, DROP 300, NORM_HOLD 4) and the drain-timeout moment are checked in
// cycles.
module tb_ft_chaos_node;
  import ft_pkg::*;

  localparam int N = 9;
  localparam int W = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  logic rst_q = 0;   // one cycle after reset release: every register holds its reset value
  always @(posedge clk) begin cyc++; rst_q <= rst_n; end

  // ---------------- per-node signals ----------------
  logic [NNB-1:0]              ebn_in   [N];
  logic [NNB-1:0]              ebn_out  [N];
  logic                        pn_ebn_in  [N];
  logic                        pn_ebn_out [N];
  fm_state_t                   fm_state [N];
  logic                        pn_init  [N];
  logic                        cfg_wr   [N];
  logic [8:0]                  cfg_wdata[N];
  logic [NCH-1:0]              link_ok  [N];
  logic [NNB-1:0]              node_ok  [N];
  logic                        dto_wr   [N];
  logic [19:0]                 dto_wdata[N];
  logic                        oto_wr   [N];
  logic [7:0]                  oto_wdata[N];
  logic [NERR-1:0]             err_clr  [N];
  logic [NERR-1:0]             err_flags[N];
  logic                        err_any  [N];
  logic [3:0]                  dropped  [N];
  logic [NCH-1:0]              hdr_v    [N];
  logic [NCH-1:0][FLIT_W-1:0]  hdr_flit [N];
  logic [NCH-1:0][NCH-1:0]     route    [N];
  logic [NCH-1:0]              eject    [N];
  logic [NCH-1:0]              fast_deroute [N];
  logic [NCH-1:0]              mq_inhibit [N];
  logic [NCH-1:0]              rx_flit_v [N];
  logic [NCH-1:0]              rx_eom   [N];
  logic [NCH-1:0]              rx_abort [N];
  logic [NCH-1:0][FLIT_W-1:0]  upd_in   [N];
  logic [NCH-1:0][FLIT_W-1:0]  upd_out  [N];
  logic [NCH-1:0]              of_wait  [N];
  logic [NCH-1:0]              we_own   [N];
  logic [NCH-1:0]              rem_want [N];
  logic [NCH-1:0]              rem_ifree[N];
  logic [NCH-1:0]              tx_start [N];
  logic [NCH-1:0]              rem_start[N];
  logic [NCH-1:0]              loc_ifree[N];
  logic                        hdr_present [N];
  logic [4:0]                  mq_valid [N];
  logic [NCH-1:0]              of_valid [N];
  logic [4:0]                  mq_clr   [N];
  logic [NCH-1:0]              of_clr   [N];
  logic [NODE_W-1:0]           my_id    [N];
  logic                        ej_v [N], ej_sop [N], ej_eop [N];
  logic [FLIT_W-1:0]           ej_flit  [N];
  logic                        inj_v [N], inj_sop [N];
  logic [FLIT_W-1:0]           inj_flit [N];
  logic [31:0]                 inj_csum [N];
  logic                        msg_open [N];
  logic [3:0]                  msg_open_tag [N];
  logic [6:0]                  msg_open_npk [N];
  logic                        msg_close [N];
  logic [3:0]                  msg_close_tag [N];
  logic                        wd_wr [N];
  logic [15:0]                 wd_wdata [N];
  logic                        ni_misdeliv [N], ni_csum_err [N], ni_pkt_v [N];
  logic                        msg_done [N];
  logic [3:0]                  msg_done_tag [N];
  logic                        msg_err_dup [N], msg_err_extra [N], msg_err_late [N];
  logic [3:0]                  msg_err_tag [N];
  logic [15:0]                 msg_busy [N];

  // broken EBN link between nodes 7 and 8
  function automatic bit broken(input int a, input int b);
    return (a == 7 && b == 8) || (a == 8 && b == 7);
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int X = n % W;
    localparam int Y = n / W;
    // ebn_in[c] comes from the neighbour in direction c, from its opposite output
    assign ebn_in[n][CH_XP] = (X < W - 1 && !broken(n, n + 1)) ? ebn_out[(X < W - 1) ? n + 1 : n][CH_XM] : 1'b0;
    assign ebn_in[n][CH_XM] = (X > 0     && !broken(n, n - 1)) ? ebn_out[(X > 0) ? n - 1 : n][CH_XP] : 1'b0;
    assign ebn_in[n][CH_YP] = (Y < W - 1 && !broken(n, n + W)) ? ebn_out[(Y < W - 1) ? n + W : n][CH_YM] : 1'b0;
    assign ebn_in[n][CH_YM] = (Y > 0     && !broken(n, n - W)) ? ebn_out[(Y > 0) ? n - W : n][CH_YP] : 1'b0;

    ft_chaos_node u_node (
      .clk, .rst_n,
      .ebn_in(ebn_in[n]), .ebn_out(ebn_out[n]),
      .pn_ebn_in(pn_ebn_in[n]), .pn_ebn_out(pn_ebn_out[n]), .fm_state(fm_state[n]),
      .pn_init(pn_init[n]), .cfg_wr(cfg_wr[n]), .cfg_wdata(cfg_wdata[n]),
      .link_ok(link_ok[n]), .node_ok(node_ok[n]),
      .dto_wr(dto_wr[n]), .dto_wdata(dto_wdata[n]), .oto_wr(oto_wr[n]), .oto_wdata(oto_wdata[n]),
      .err_clr(err_clr[n]), .err_flags(err_flags[n]), .err_any(err_any[n]), .dropped(dropped[n]),
      .hdr_v(hdr_v[n]), .hdr_flit(hdr_flit[n]), .route(route[n]), .eject(eject[n]),
      .fast_deroute(fast_deroute[n]), .mq_inhibit(mq_inhibit[n]),
      .rx_flit_v(rx_flit_v[n]), .rx_eom(rx_eom[n]), .rx_abort(rx_abort[n]),
      .upd_in(upd_in[n]), .upd_out(upd_out[n]), .of_wait(of_wait[n]),
      .we_own(we_own[n]), .rem_want(rem_want[n]), .rem_ifree(rem_ifree[n]),
      .tx_start(tx_start[n]), .rem_start(rem_start[n]), .loc_ifree(loc_ifree[n]),
      .hdr_present(hdr_present[n]), .mq_valid(mq_valid[n]), .of_valid(of_valid[n]),
      .mq_clr(mq_clr[n]), .of_clr(of_clr[n]),
      .my_id(my_id[n]), .ej_v(ej_v[n]), .ej_sop(ej_sop[n]), .ej_eop(ej_eop[n]), .ej_flit(ej_flit[n]),
      .inj_v(inj_v[n]), .inj_sop(inj_sop[n]), .inj_flit(inj_flit[n]), .inj_csum(inj_csum[n]),
      .msg_open(msg_open[n]), .msg_open_tag(msg_open_tag[n]), .msg_open_npk(msg_open_npk[n]),
      .msg_close(msg_close[n]), .msg_close_tag(msg_close_tag[n]),
      .wd_wr(wd_wr[n]), .wd_wdata(wd_wdata[n]),
      .ni_misdeliv(ni_misdeliv[n]), .ni_csum_err(ni_csum_err[n]), .ni_pkt_v(ni_pkt_v[n]),
      .msg_done(msg_done[n]), .msg_done_tag(msg_done_tag[n]), .msg_err_dup(msg_err_dup[n]),
      .msg_err_extra(msg_err_extra[n]), .msg_err_late(msg_err_late[n]),
      .msg_err_tag(msg_err_tag[n]), .msg_busy(msg_busy[n])
    );
  end

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_HDR_UPDATE, M_ROUTE_PROF, M_NO_ROUTEBACK, M_FAST_DEROUTE, M_ROUTEBACK_ONLY,
    M_DEST_EJECT, M_PARITY_EJECT, M_LEN_ABORT, M_PROTO_ERR, M_OUT_TIMEOUT,
    M_CFG_REJECT, M_CFG_WRITE, M_ERR_CLEAR, M_CSUM_GOOD, M_CSUM_BAD, M_MISDELIV,
    M_MSG_DONE, M_MSG_DUP, M_MSG_EXTRA, M_MSG_LATE, M_EUREKA_ERR, M_PN_NOTIFY,
    M_ERR_PROP, M_DRAIN, M_NET_CLEAR, M_DECISION, M_DIAG, M_NORM_HOLD, M_DROP,
    M_FORCE_EJECT, M_DROP_CLEAR, M_DROP_REPORT, M_BROKEN_LINK_DETOUR, M_NCOUNT
  } mech_e;
  int mcount [M_NCOUNT];

  // per-node state-entry bookkeeping
  fm_state_t prev_st [N];
  int        ent_cyc [N][8];
  int        ent_num [N][8];
  int        dwell_bad = 0;

  always @(posedge clk) if (rst_q) begin
    for (int n = 0; n < N; n++) begin
      if (fm_state[n] != prev_st[n]) begin
        int len;
        len = cyc - ent_cyc[n][prev_st[n]];
        // dwell times of the fixed-length states (a drain timeout cuts them short)
        if (fm_state[n] != FM_DROP) case (prev_st[n])
          FM_ERR_PROP:  if (len != 6)    dwell_bad++;
          FM_NET_CLEAR: if (len != 4)    dwell_bad++;
          FM_DIAG:      if (len != 4000) dwell_bad++;
          FM_DROP:      if (len != 300)  dwell_bad++;
          FM_NORM_HOLD: if (len != 4)    dwell_bad++;
          FM_DECISION:  if (len != 160)  dwell_bad++;
          FM_DRAIN:     if (len != 160)  dwell_bad++;
          default: ;
        endcase
        ent_cyc[n][fm_state[n]] = cyc;
        ent_num[n][fm_state[n]]++;
        case (fm_state[n])
          FM_ERR_PROP:  mcount[M_ERR_PROP]++;
          FM_DRAIN:     mcount[M_DRAIN]++;
          FM_NET_CLEAR: mcount[M_NET_CLEAR]++;
          FM_DECISION:  mcount[M_DECISION]++;
          FM_DIAG:      mcount[M_DIAG]++;
          FM_NORM_HOLD: mcount[M_NORM_HOLD]++;
          FM_DROP:      mcount[M_DROP]++;
          default: ;
        endcase
      end
      prev_st[n] = fm_state[n];
      if (pn_ebn_out[n]) mcount[M_PN_NOTIFY]++;
      if (mq_clr[n] != '0 || of_clr[n] != '0) mcount[M_DROP_CLEAR]++;
      if (ni_pkt_v[n])      mcount[M_CSUM_GOOD]++;
      if (ni_csum_err[n])   mcount[M_CSUM_BAD]++;
      if (ni_misdeliv[n])   mcount[M_MISDELIV]++;
      if (msg_done[n])      mcount[M_MSG_DONE]++;
      if (msg_err_dup[n])   mcount[M_MSG_DUP]++;
      if (msg_err_extra[n]) mcount[M_MSG_EXTRA]++;
      if (msg_err_late[n])  mcount[M_MSG_LATE]++;
    end
  end

  // ---------------- helpers ----------------
  task automatic tick(input int k = 1);
    repeat (k) begin @(posedge clk); #1; end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  function automatic logic [15:0] mkhdr(input int dx, input int dy);
    hdr_t h;
    h.rsv = 1'b0;
    h.dx  = DISP_W'(dx);
    h.dy  = DISP_W'(dy);
    h.par = hdr_par(h);
    return 16'(h);
  endfunction

  task automatic all_state(input fm_state_t s, input string what);
    bit ok;
    ok = 1;
    for (int n = 0; n < N; n++) if (fm_state[n] != s) ok = 0;
    check(ok, what);
  endtask

  // Inject a packet at node 4 to obtain its checksum, then eject it at node 4.
  task automatic send_pkt(input int dest, input int seq, input int tag, input bit multi,
                          input bit corrupt);
    logic [15:0] f [20];
    logic [31:0] cs;
    int len, fb;
    len = $urandom_range(5, 18);
    f[0] = mkhdr(0, 0);
    f[1] = {10'(dest), 6'(seq)};
    f[2] = {10'd8, 4'(tag), multi, 1'b0};
    for (int i = 3; i < len; i++) f[i] = 16'($urandom);
    for (int i = 0; i < len; i++) begin
      inj_v[4] = 1; inj_sop[4] = (i == 0); inj_flit[4] = f[i];
      #1;
      if (i == len - 1) cs = inj_csum[4];
      tick();
    end
    inj_v[4] = 0; inj_sop[4] = 0;
    f[len] = cs[31:16];
    f[len + 1] = cs[15:0];
    fb = $urandom_range(0, 15);
    if (corrupt) f[3][fb] = ~f[3][fb];
    for (int i = 0; i < len + 2; i++) begin
      ej_v[4] = 1; ej_sop[4] = (i == 0); ej_eop[4] = (i == len + 1); ej_flit[4] = f[i];
      tick();
    end
    ej_v[4] = 0; ej_sop[4] = 0; ej_eop[4] = 0;
    tick(2);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- stimulus ----------------
  int hops [N];
  int t_drop;
  initial begin
    for (int n = 0; n < N; n++) begin
      prev_st[n] = FM_NORMAL;
      for (int s = 0; s < 8; s++) begin ent_cyc[n][s] = 0; ent_num[n][s] = 0; end
      pn_ebn_in[n] = 0; pn_init[n] = 0; cfg_wr[n] = 0; cfg_wdata[n] = '0;
      dto_wr[n] = 0; dto_wdata[n] = '0; oto_wr[n] = 0; oto_wdata[n] = '0; err_clr[n] = '0;
      hdr_v[n] = '0; hdr_flit[n] = '0; rx_flit_v[n] = '0; rx_eom[n] = '0; upd_in[n] = '0;
      of_wait[n] = '0; we_own[n] = '0; rem_want[n] = '0; rem_ifree[n] = '1; tx_start[n] = '0;
      rem_start[n] = '0; loc_ifree[n] = '1; hdr_present[n] = 0; mq_valid[n] = '0; of_valid[n] = '0;
      my_id[n] = NODE_W'(n); ej_v[n] = 0; ej_sop[n] = 0; ej_eop[n] = 0; ej_flit[n] = '0;
      inj_v[n] = 0; inj_sop[n] = 0; inj_flit[n] = '0; msg_open[n] = 0; msg_open_tag[n] = '0;
      msg_open_npk[n] = '0; msg_close[n] = 0; msg_close_tag[n] = '0; wd_wr[n] = 0; wd_wdata[n] = '0;
    end
    for (int m = 0; m < M_NCOUNT; m++) mcount[m] = 0;
    // EBN hop distance from node 8, link 7-8 broken (7 is reached through 4)
    hops = '{4, 3, 2, 3, 2, 1, 4, 3, 0};
    tick(3);
    rst_n = 1;
    tick(3);
    all_state(FM_NORMAL, "all nodes normal after reset");
    check(link_ok[4] == 5'h1f && node_ok[4] == 4'hf, "configuration resets to all usable");

    // ================= phase 1: normal operation on node 4 =================
    // header update on every output frame
    for (int k = 0; k < 50; k++) begin
      int dx, dy, c;
      logic [15:0] o;
      dx = $urandom_range(0, 40) - 20; dy = $urandom_range(0, 40) - 20;
      c = $urandom_range(0, NCH - 1);
      upd_in[4][c] = mkhdr(dx, dy);
      #1;
      o = upd_out[4][c];
      check(o == mkhdr(dx - int'(c == CH_XP) + int'(c == CH_XM), dy - int'(c == CH_YP) + int'(c == CH_YM)),
            "header update");
      mcount[M_HDR_UPDATE]++;
    end
    // profitable routing: arrived from X-, travelling +x,-y
    hdr_v[4][CH_XM] = 1; hdr_flit[4][CH_XM] = mkhdr(3, -2);
    #1;
    check(route[4][CH_XM] == 5'b01001 && !eject[4][CH_XM] && !fast_deroute[4][CH_XM], "profitable route");
    mcount[M_ROUTE_PROF]++;
    // No Routeback: arrived on X+, only X+ profitable -> deroute on the other functional links
    hdr_v[4][CH_XP] = 1; hdr_flit[4][CH_XP] = mkhdr(5, 0);
    #1;
    check(route[4][CH_XP] == 5'b01110 && fast_deroute[4][CH_XP], "no routeback, fast deroute");
    mcount[M_NO_ROUTEBACK]++;
    mcount[M_FAST_DEROUTE]++;
    // destination reached
    hdr_v[4][CH_YP] = 1; hdr_flit[4][CH_YP] = mkhdr(0, 0);
    #1;
    check(route[4][CH_YP] == 5'b10000 && eject[4][CH_YP] && !mq_inhibit[4][CH_YP], "eject at destination");
    mcount[M_DEST_EJECT]++;
    tick();
    check(err_flags[4] == '0, "no error flags from good headers");
    // parity error on Y-
    hdr_v[4][CH_YM] = 1; hdr_flit[4][CH_YM] = mkhdr(2, 2) ^ 16'h0100;
    #1;
    check(eject[4][CH_YM] && mq_inhibit[4][CH_YM] && route[4][CH_YM] == 5'b10000, "parity error ejects");
    tick();
    hdr_v[4] = '0;
    tick();
    check(err_flags[4][E_PARITY] && err_any[4], "parity flag");
    mcount[M_PARITY_EJECT]++;
    // flit-count overflow on Y+: 21 flits without end of message
    for (int i = 0; i < 21; i++) begin rx_flit_v[4][CH_YP] = 1; tick(); end
    rx_flit_v[4][CH_YP] = 0;
    check(rx_abort[4][CH_YP], "overflow aborts reception");
    tick();
    check(err_flags[4][E_LENGTH], "length flag");
    rx_flit_v[4][CH_YP] = 1; rx_eom[4][CH_YP] = 1; tick();
    rx_flit_v[4][CH_YP] = 0; rx_eom[4][CH_YP] = 0; tick();
    check(!rx_abort[4][CH_YP], "abort ends at end of message");
    mcount[M_LEN_ABORT]++;
    // channel protocol error: a packet sent to us while our input frame is busy
    loc_ifree[4][CH_XP] = 0; rem_start[4][CH_XP] = 1; tick();
    loc_ifree[4][CH_XP] = 1; rem_start[4][CH_XP] = 0; tick(2);
    check(err_flags[4][E_PROTO], "protocol flag");
    mcount[M_PROTO_ERR]++;
    // output-frame timeout at the reset limit 255
    begin
      int t0, t1;
      of_wait[4][CH_YM] = 1;
      t0 = cyc;
      while (!err_flags[4][E_OTIMEO] && cyc - t0 < 400) tick();
      t1 = cyc;
      of_wait[4][CH_YM] = 0;
      check(t1 - t0 == 256, $sformatf("output timeout after %0d cycles", t1 - t0));
      mcount[M_OUT_TIMEOUT]++;
    end
    // configuration write outside diagnostics is refused
    cfg_wr[4] = 1; cfg_wdata[4] = 9'h001; tick(); cfg_wr[4] = 0; tick(2);
    check(link_ok[4] == 5'h1f && err_flags[4][E_CFG], "configuration write refused");
    mcount[M_CFG_REJECT]++;
    // clear the flags
    err_clr[4] = '1; tick(); err_clr[4] = '0; tick();
    check(err_flags[4] == '0 && !err_any[4], "flags cleared");
    mcount[M_ERR_CLEAR]++;
    // ---- network interface ----
    msg_open[4] = 1; msg_open_tag[4] = 4'd2; msg_open_npk[4] = 7'd3; tick(); msg_open[4] = 0;
    send_pkt(4, 0, 2, 1, 0);
    send_pkt(4, 2, 2, 1, 0);
    send_pkt(4, 2, 2, 1, 0);       // duplicate
    send_pkt(4, 1, 2, 1, 1);       // corrupted: checksum error, not delivered
    check(msg_busy[4][2], "message waits for its last packet");
    send_pkt(4, 1, 2, 1, 0);       // resent
    check(!msg_busy[4][2], "message complete");
    send_pkt(6, 0, 3, 0, 0);       // addressed to node 6
    send_pkt(4, 5, 9, 1, 0);       // message 9 not open
    send_pkt(4, 0, 0, 0, 0);       // single packet message
    wd_wr[4] = 1; wd_wdata[4] = 16'd200; tick(); wd_wr[4] = 0;
    msg_open[4] = 1; msg_open_tag[4] = 4'd7; msg_open_npk[4] = 7'd2; tick(); msg_open[4] = 0;
    send_pkt(4, 0, 7, 1, 0);
    tick(250);
    check(mcount[M_MSG_LATE] == 1, "watchdog reports a late message");
    msg_close[4] = 1; msg_close_tag[4] = 4'd7; tick(); msg_close[4] = 0; tick();
    check(msg_busy[4] == '0, "all messages closed");
    check(mcount[M_CSUM_GOOD] == 7 && mcount[M_CSUM_BAD] == 1 && mcount[M_MISDELIV] == 1,
          $sformatf("packet counts good %0d bad %0d misdelivered %0d", mcount[M_CSUM_GOOD],
                    mcount[M_CSUM_BAD], mcount[M_MISDELIV]));
    check(mcount[M_MSG_DONE] == 1 && mcount[M_MSG_DUP] == 1 && mcount[M_MSG_EXTRA] == 1,
          "message tracker counts");
    all_state(FM_NORMAL, "no fault round from local errors");

    // ================= phase 2: fault round with diagnostics =================
    pn_ebn_in[8] = 1; tick(); pn_ebn_in[8] = 0;
    mcount[M_EUREKA_ERR]++;
    tick(20);
    begin
      bit ok;
      ok = 1;
      for (int n = 0; n < N; n++) if (fm_state[n] == FM_NORMAL) ok = 0;
      check(ok, "everyone left normal");
    end
    begin
      bit ok;
      ok = 1;
      for (int n = 0; n < N; n++)
        if (ent_cyc[n][FM_ERR_PROP] - ent_cyc[8][FM_ERR_PROP] != 2 * hops[n]) ok = 0;
      check(ok, "eureka arrives 2 cycles per hop around the broken link");
      if (ok) mcount[M_BROKEN_LINK_DETOUR]++;
    end
    hdr_present[4] = 1;                     // a header still in node 4
    tick(200);
    hdr_present[4] = 0;
    // wait for DECISION everywhere
    begin
      int w;
      w = 0;
      while (fm_state[0] != FM_DECISION && w < 2000) begin tick(); w++; end
    end
    tick(10);
    all_state(FM_DECISION, "network clear, decision window");
    check(ent_num[4][FM_NET_CLEAR] >= 1 && ent_num[0][FM_NET_CLEAR] == ent_num[4][FM_NET_CLEAR],
          "barrier held every node in the drain");
    pn_ebn_in[4] = 1; tick(); pn_ebn_in[4] = 0;  // diagnostics requested
    begin
      int w;
      w = 0;
      while (fm_state[4] != FM_DIAG && w < 400) begin tick(); w++; end
    end
    tick(20);
    all_state(FM_DIAG, "every node runs diagnostics");
    // reconfigure node 4 during diagnostics: only X+ usable
    cfg_wr[4] = 1; cfg_wdata[4] = 9'h1e1; tick(); cfg_wr[4] = 0; tick();
    check(link_ok[4] == 5'h01 && !err_flags[4][E_CFG], "configuration written in diagnostics");
    mcount[M_CFG_WRITE]++;
    hdr_v[4][CH_XP] = 1; hdr_flit[4][CH_XP] = mkhdr(-3, 1);
    #1;
    check(route[4][CH_XP] == 5'b00001 && fast_deroute[4][CH_XP], "arrival link used when it is the only one");
    mcount[M_ROUTEBACK_ONLY]++;
    hdr_v[4] = '0;
    cfg_wr[4] = 1; cfg_wdata[4] = 9'h1ff; tick(); cfg_wr[4] = 0; tick();
    check(link_ok[4] == 5'h1f, "configuration restored");
    tick(4100);
    all_state(FM_NORMAL, "back to normal after diagnostics");
    for (int n = 0; n < N; n++) check(ent_num[n][FM_DIAG] == 1, "one diagnostics period per node");

    // ================= phase 3: drain timeout and drop =================
    for (int n = 0; n < N; n++) begin dto_wr[n] = 1; dto_wdata[n] = 20'd600; end
    tick();
    for (int n = 0; n < N; n++) dto_wr[n] = 0;
    hdr_present[4] = 1;                      // never drains
    mq_valid[4] = 5'b10110; of_valid[4] = 5'b00011;
    pn_ebn_in[2] = 1; tick(); pn_ebn_in[2] = 0;
    mcount[M_EUREKA_ERR]++;
    begin
      int w;
      w = 0;
      while (fm_state[4] != FM_DROP && w < 2000) begin tick(); w++; end
      t_drop = cyc;
      check(fm_state[4] == FM_DROP, "drain timeout reached");
      tick();
      // 6 cycles of ERR_PROP, 600 counted drain cycles, then one cycle to act on it
      check(ent_cyc[4][FM_DROP] - ent_cyc[4][FM_ERR_PROP] == 607, $sformatf("drop after %0d cycles",
            ent_cyc[4][FM_DROP] - ent_cyc[4][FM_ERR_PROP]));
    end
    hdr_present[4] = 0;
    tick(10);
    hdr_v[4][CH_XM] = 1; hdr_flit[4][CH_XM] = mkhdr(2, 2);
    #1;
    check(eject[4][CH_XM] && route[4][CH_XM] == 5'b10000, "force eject during drop");
    mcount[M_FORCE_EJECT]++;
    hdr_v[4] = '0;
    begin
      int w;
      w = 0;
      while (mq_clr[4] == '0 && w < 400) begin tick(); w++; end
      check(mq_clr[4] == 5'b10110 && of_clr[4] == 5'b00011, "buffers cleared at the end of drop");
      check(cyc - t_drop == 299, $sformatf("clear after %0d cycles", cyc - t_drop));
    end
    tick(2);
    mq_valid[4] = '0; of_valid[4] = '0;
    check(dropped[4] == 4'd5 && err_flags[4][E_DROP], "dropped packets reported");
    mcount[M_DROP_REPORT]++;
    tick(200);
    all_state(FM_NORMAL, "back to normal after drop");

    // ================= summary =================
    check(dwell_bad == 0, $sformatf("%0d state dwell times wrong", dwell_bad));
    for (int m = 0; m < M_NCOUNT; m++) begin
      mech_e e;
      e = mech_e'(m);
      $display("mechanism %-22s %0d", e.name(), mcount[m]);
      check(mcount[m] > 0, $sformatf("mechanism %s never happened", e.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
