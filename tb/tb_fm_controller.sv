// tb_fm_controller -- self-checking test of the fault-management state machine.
// Short windows (NET_DELAY2 = 20, DROP_TIME = 10, DIAG_TIME = 30) and a tb-driven
// EBN.  Round 1: eureka -> ERR_PROP (6 cycles) -> DRAIN with a header present ->
// NET_CLEAR (4 cycles) -> DRAIN, no assertion -> DECISION with a diagnostics
// eureka -> DIAG (30) -> NORM_HOLD (4) -> NORMAL.  Round 2: drain never completes,
// the drain timeout (tb model) fires -> DROP: 9 force_eject cycles and one
// drop_clear -> DECISION, silent -> NORMAL.  Dwell times are checked in cycles.
module tb_fm_controller;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, heard_in = 0, hdr_present = 0, drain_expired = 0;
  fm_state_t state;
  logic ebn_drive, ebn_listen, drain_run, drain_start, force_eject, drop_clear;
  logic heard;
  int n_fe = 0, n_dc = 0;
  always #5 clk = ~clk;

  assign heard = heard_in && ebn_listen;

  fm_controller #(.NET_DELAY2(20), .DROP_TIME(10), .DIAG_TIME(30)) dut (
    .clk, .rst_n, .heard, .hdr_present, .drain_expired, .state, .ebn_drive, .ebn_listen,
    .drain_run, .drain_start, .force_eject, .drop_clear);

  always @(posedge clk) if (rst_n) begin
    if (force_eject) n_fe++;
    if (drop_clear) n_dc++;
  end

  // wait for the state to change, return the number of cycles it stayed
  task automatic dwell(input fm_state_t s, input int exp_cycles, input fm_state_t nxt);
    int n;
    n = 0;
    while (state == s && n < 10000) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != exp_cycles || state !== nxt) begin
      failures++;
      $display("FAIL in %s: %0d cycles (exp %0d), next %s (exp %s)", s.name(), n, exp_cycles,
               state.name(), nxt.name());
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    #1;
    checks++; if (state !== FM_NORMAL || !ebn_listen) failures++;
    // ---- round 1 ----
    heard_in = 1;
    #1;
    checks++; if (!ebn_drive) begin failures++; $display("FAIL eureka not re-driven"); end
    @(posedge clk); #1;
    heard_in = 0;
    checks++; if (state !== FM_ERR_PROP || ebn_listen || ebn_drive || !drain_start) failures++;
    dwell(FM_ERR_PROP, 6, FM_DRAIN);
    hdr_present = 1;
    #1;
    checks++; if (!ebn_drive || !drain_run) failures++;
    @(posedge clk); #1;
    hdr_present = 0;                            // sticky: keeps asserting
    checks++; if (!ebn_drive) begin failures++; $display("FAIL barrier not sticky"); end
    dwell(FM_DRAIN, 19, FM_NET_CLEAR);
    checks++; if (ebn_listen || ebn_drive || !drain_run) failures++;
    dwell(FM_NET_CLEAR, 4, FM_DRAIN);
    dwell(FM_DRAIN, 20, FM_DECISION);
    repeat (5) @(posedge clk);
    #1 heard_in = 1; @(posedge clk); #1; heard_in = 0;
    dwell(FM_DECISION, 14, FM_DIAG);
    checks++; if (ebn_listen) failures++;
    dwell(FM_DIAG, 30, FM_NORM_HOLD);
    dwell(FM_NORM_HOLD, 4, FM_NORMAL);
    // ---- round 2: drain timeout ----
    repeat (3) @(posedge clk);
    #1 heard_in = 1; @(posedge clk); #1; heard_in = 0;
    dwell(FM_ERR_PROP, 6, FM_DRAIN);
    hdr_present = 1;                            // a stuck packet
    repeat (50) @(posedge clk);
    #1;
    checks++; if (state != FM_DRAIN && state != FM_NET_CLEAR) failures++;
    drain_expired = 1;
    @(posedge clk); #1;
    drain_expired = 0; hdr_present = 0;
    checks++; if (state !== FM_DROP) begin failures++; $display("FAIL no DROP: %s", state.name()); end
    dwell(FM_DROP, 10, FM_DECISION);
    checks++; if (n_fe != 9 || n_dc != 1) begin failures++; $display("FAIL drop phases %0d %0d", n_fe, n_dc); end
    dwell(FM_DECISION, 20, FM_NORM_HOLD);
    dwell(FM_NORM_HOLD, 4, FM_NORMAL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
