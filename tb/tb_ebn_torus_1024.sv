// tb_ebn_torus_1024 -- synchronisation of 1024 routers over the one-wire EBN.
//
// A 32 x 32 torus of ebn_node + fm_controller pairs, at their default
// parameters: 2 cycles per hop and a 160-cycle two-Network-Delay window.  The
// diameter of the torus is 32 hops (64 cycles), the largest network the fault-
// management timing was sized for.  Two links are broken in both directions to
// show that the broadcast finds its way around them.  Sequence:
//   1. node 0's processing node raises an error eureka for one cycle; every
//      router must enter ERR_PROP exactly 2 cycles per hop of its shortest
//      working path after node 0 (distances computed by a breadth-first search
//      in the testbench);
//   2. the most distant router (16,16) holds a packet header for 300 cycles; the
//      barrier must keep every router draining, and all 1024 must go through the
//      same number of NET_CLEAR loops before reaching DECISION;
//   3. router (16,16), the last to enter DECISION, asks for diagnostics on its
//      first DECISION cycle; every router must enter DIAG, stay 4000 cycles and
//      come back to NORMAL.
// Mechanisms counted: eureka spread, barrier loop, decision eureka, return to
// normal; the run fails if any of them never happened.
module tb_ebn_torus_1024;
  import ft_pkg::*;

  localparam int W = 32;
  localparam int N = W * W;
  localparam int FAR = 16 * W + 16;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic [3:0]  ebn_in  [N];
  logic [3:0]  ebn_out [N];
  logic        pn_in   [N];
  logic        pn_out  [N];
  logic        heard   [N];
  logic        drive   [N];
  logic        listen  [N];
  logic        hdr_present [N];
  fm_state_t   state   [N];

  // broken links (both directions): (5,0)-(6,0) and (20,20)-(20,21)
  function automatic bit broken(input int a, input int b);
    return (a == 5 && b == 6) || (a == 6 && b == 5) ||
           (a == 20 * W + 20 && b == 21 * W + 20) || (a == 21 * W + 20 && b == 20 * W + 20);
  endfunction

  function automatic int nb(input int n, input int c);
    int x, y;
    x = n % W; y = n / W;
    case (c)
      0: x = (x + 1) % W;
      1: x = (x + W - 1) % W;
      2: y = (y + 1) % W;
      default: y = (y + W - 1) % W;
    endcase
    return y * W + x;
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_node
    // input c comes from the neighbour in direction c, from its opposite output
    assign ebn_in[n][0] = broken(n, nb(n, 0)) ? 1'b0 : ebn_out[nb(n, 0)][1];
    assign ebn_in[n][1] = broken(n, nb(n, 1)) ? 1'b0 : ebn_out[nb(n, 1)][0];
    assign ebn_in[n][2] = broken(n, nb(n, 2)) ? 1'b0 : ebn_out[nb(n, 2)][3];
    assign ebn_in[n][3] = broken(n, nb(n, 3)) ? 1'b0 : ebn_out[nb(n, 3)][2];

    ebn_node u_ebn (
      .clk, .rst_n, .ebn_in(ebn_in[n]), .pn_in(pn_in[n]), .listen(listen[n]), .drive(drive[n]),
      .ebn_out(ebn_out[n]), .pn_out(pn_out[n]), .heard(heard[n])
    );

    fm_controller u_fm (
      .clk, .rst_n, .heard(heard[n]), .hdr_present(hdr_present[n]), .drain_expired(1'b0),
      .state(state[n]), .ebn_drive(drive[n]), .ebn_listen(listen[n]),
      .drain_run(), .drain_start(), .force_eject(), .drop_clear()
    );
  end

  // ---------------- bookkeeping ----------------
  fm_state_t prev [N];
  int ent_ep [N];
  int ent_dec [N];
  int n_nc [N];
  int n_diag [N];
  int diag_len_bad = 0;
  int ent_diag [N];
  int n_eureka_spread = 0, n_barrier_loop = 0, n_decision_eureka = 0, n_back_normal = 0;
  logic rst_q = 0;

  always @(posedge clk) begin
    rst_q <= rst_n;
    if (rst_q) begin
      for (int n = 0; n < N; n++) begin
        if (state[n] != prev[n]) begin
          case (state[n])
            FM_ERR_PROP:  ent_ep[n] = cyc;
            FM_NET_CLEAR: n_nc[n]++;
            FM_DECISION:  ent_dec[n] = cyc;
            FM_DIAG:      begin n_diag[n]++; ent_diag[n] = cyc; end
            default: ;
          endcase
          if (prev[n] == FM_DIAG && cyc - ent_diag[n] != 4000) diag_len_bad++;
        end
        prev[n] = state[n];
      end
    end
  end

  task automatic tick(input int k = 1);
    repeat (k) begin @(posedge clk); #1; end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  function automatic bit all_in(input fm_state_t s);
    for (int n = 0; n < N; n++) if (state[n] !== s) return 0;
    return 1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int hops [N];
  int q [$];
  initial begin
    for (int n = 0; n < N; n++) begin
      pn_in[n] = 0; hdr_present[n] = 0; prev[n] = FM_NORMAL;
      ent_ep[n] = 0; ent_dec[n] = 0; n_nc[n] = 0; n_diag[n] = 0; ent_diag[n] = 0;
      hops[n] = -1;
    end
    // breadth-first search from node 0 over working links
    hops[0] = 0;
    q.push_back(0);
    while (q.size() > 0) begin
      int u;
      u = q.pop_front();
      for (int c = 0; c < 4; c++) begin
        int v;
        v = nb(u, c);
        if (!broken(u, v) && hops[v] < 0) begin hops[v] = hops[u] + 1; q.push_back(v); end
      end
    end
    tick(3);
    rst_n = 1;
    tick(3);
    check(all_in(FM_NORMAL), "all routers normal after reset");

    // 1. error eureka from node 0
    pn_in[0] = 1; tick(); pn_in[0] = 0;
    hdr_present[FAR] = 1;                      // a packet still in the farthest router
    tick(100);
    begin
      int bad, maxd;
      bad = 0; maxd = 0;
      for (int n = 0; n < N; n++) begin
        if (ent_ep[n] - ent_ep[0] != 2 * hops[n]) bad++;
        if (hops[n] > maxd) maxd = hops[n];
      end
      check(bad == 0, $sformatf("%0d routers heard the eureka off the 2-cycle-per-hop schedule", bad));
      check(maxd >= 32, $sformatf("largest distance %0d hops", maxd));
      $display("eureka reached all %0d routers; largest distance %0d hops, %0d cycles", N, maxd, 2 * maxd);
      if (bad == 0) n_eureka_spread++;
    end
    // 2. barrier held by one router
    tick(200);
    hdr_present[FAR] = 0;
    begin
      int w;
      w = 0;
      while (!all_in(FM_DECISION) && w < 3000) begin tick(); w++; end
      check(all_in(FM_DECISION), "every router reached DECISION");
    end
    begin
      int bad;
      bad = 0;
      for (int n = 0; n < N; n++) if (n_nc[n] != n_nc[0]) bad++;
      check(bad == 0 && n_nc[0] >= 1, $sformatf("NET_CLEAR loops: router 0 %0d, %0d routers differ", n_nc[0], bad));
      if (bad == 0 && n_nc[0] >= 1) n_barrier_loop++;
    end
    // 3. the last router to enter DECISION asks for diagnostics at once
    while (state[FAR] != FM_DECISION) tick();
    pn_in[FAR] = 1; tick(); pn_in[FAR] = 0;
    n_decision_eureka++;
    begin
      int w;
      w = 0;
      while (!all_in(FM_NORMAL) && w < 6000) begin tick(); w++; end
    end
    tick(2);
    begin
      int bad;
      bad = 0;
      for (int n = 0; n < N; n++) if (n_diag[n] != 1) bad++;
      check(bad == 0, $sformatf("%0d routers missed the diagnostics decision", bad));
      check(diag_len_bad == 0, "every DIAG lasted 4000 cycles");
      check(all_in(FM_NORMAL), "every router back to normal");
      if (all_in(FM_NORMAL)) n_back_normal++;
    end
    $display("mechanisms: eureka spread %0d, barrier loop %0d, decision eureka %0d, back to normal %0d",
             n_eureka_spread, n_barrier_loop, n_decision_eureka, n_back_normal);
    check(n_eureka_spread > 0 && n_barrier_loop > 0 && n_decision_eureka > 0 && n_back_normal > 0,
          "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
