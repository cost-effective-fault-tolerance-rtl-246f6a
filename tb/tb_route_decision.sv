// tb_route_decision -- self-checking test of the fault-tolerant routing decision.
// Two instances: a packet that arrived on X- (so X- is its routeback link) and a
// freshly injected packet.  A reference model written from the rules (mask AND,
// No Routeback unless it is the only functional link, fast deroute, eject)
// predicts every output.  Counts how often each rule fired.
module tb_route_decision;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  int n_fast = 0, n_norb = 0, n_par = 0, n_force = 0, n_dest = 0;
  logic [FLIT_W-1:0] hdr;
  logic              par_err, force_eject;
  logic [NNB-1:0]    link_ok;
  logic [NCH-1:0]    route_a, route_b;
  logic              ej_a, ej_b, fd_a, fd_b, mi_a, mi_b;

  route_decision #(.ARR_CH(CH_XM)) dut_a (.hdr_flit(hdr), .par_err, .link_ok, .force_eject,
    .route(route_a), .eject(ej_a), .fast_deroute(fd_a), .mq_inhibit(mi_a));
  route_decision #(.ARR_CH(CH_PN)) dut_b (.hdr_flit(hdr), .par_err, .link_ok, .force_eject,
    .route(route_b), .eject(ej_b), .fast_deroute(fd_b), .mq_inhibit(mi_b));

  // reference model
  function automatic void model(input int arr, input int dx, input int dy, input logic pe,
                                input logic fe, input logic [3:0] ok,
                                output logic [4:0] r, output logic ej, output logic fd);
    logic [3:0] prof, lst;
    int nfunc_other;
    r = '0; ej = 0; fd = 0;
    if (pe || fe || (dx == 0 && dy == 0)) begin r = 5'b10000; ej = 1; return; end
    prof = {dy < 0, dy > 0, dx < 0, dx > 0};
    lst = prof & ok;
    nfunc_other = 0;
    for (int i = 0; i < 4; i++) if (ok[i] && i != arr) nfunc_other++;
    if (arr < 4 && nfunc_other > 0) lst[arr] = 0;
    if (lst != 0) begin r = {1'b0, lst}; return; end
    lst = ok;
    if (arr < 4 && nfunc_other > 0) lst[arr] = 0;
    r = {1'b0, lst}; fd = (lst != 0);
  endfunction

  initial begin
    #1000000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int dx, dy;
      logic [4:0] ra, rb; logic ea, eb, fa, fb;
      dx = $urandom_range(0, 6) - 3;
      dy = $urandom_range(0, 6) - 3;
      hdr = {2'b00, 7'(dx), 7'(dy)};
      par_err     = ($urandom_range(0, 15) == 0);
      force_eject = ($urandom_range(0, 15) == 0);
      link_ok     = 4'($urandom);
      #1;
      model(1, dx, dy, par_err, force_eject, link_ok, ra, ea, fa);
      model(4, dx, dy, par_err, force_eject, link_ok, rb, eb, fb);
      checks += 2;
      if (route_a !== ra || ej_a !== ea || fd_a !== fa || mi_a !== par_err) begin
        failures++;
        $display("FAIL A dx %0d dy %0d ok %b pe %b fe %b: route %b/%b ej %b/%b fd %b/%b",
                 dx, dy, link_ok, par_err, force_eject, route_a, ra, ej_a, ea, fd_a, fa);
      end
      if (route_b !== rb || ej_b !== eb || fd_b !== fb || mi_b !== par_err) begin
        failures++;
        $display("FAIL B dx %0d dy %0d ok %b: route %b/%b", dx, dy, link_ok, route_b, rb);
      end
      if (fd_a) n_fast++;
      if (!ej_a && dx < 0 && link_ok[1] && link_ok != 4'b0010 && !route_a[1]) n_norb++;
      if (par_err) n_par++;
      if (force_eject && !par_err) n_force++;
      if (dx == 0 && dy == 0) n_dest++;
    end
    // each mechanism must have been exercised
    checks++; if (n_fast == 0) begin failures++; $display("no fast deroute"); end
    checks++; if (n_norb == 0) begin failures++; $display("no routeback removal"); end
    checks++; if (n_par == 0 || n_force == 0 || n_dest == 0) failures++;
    $display("fast %0d noroutebk %0d parity %0d force %0d dest %0d", n_fast, n_norb, n_par, n_force, n_dest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
