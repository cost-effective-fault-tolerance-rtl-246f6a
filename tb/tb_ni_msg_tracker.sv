// tb_ni_msg_tracker -- self-checking test of the message tracker.
// Opens messages, delivers their packets in random order with random gaps and
// checks completion; then checks a duplicate, an extra packet, a packet for a
// closed message, and a watchdog expiry at exactly the programmed limit, after
// which a late packet still completes the message.  Finally the full load of
// 16 open messages of 64 packets each, 1024 arrivals interleaved at random.
module tb_ni_msg_tracker;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic open = 0, close = 0, wd_wr = 0, pkt_v = 0;
  logic [3:0] open_tag = '0, close_tag = '0, pkt_tag = '0;
  logic [6:0] open_npk = '0;
  logic [15:0] wd_wdata = '0;
  logic [5:0] pkt_seq = '0;
  logic done, err_dup, err_extra, err_late;
  logic [3:0] done_tag, err_tag;
  logic [15:0] busy;
  int n_done = 0, n_dup = 0, n_extra = 0, n_late = 0;
  int late_cycle = -1, open_cycle = 0, cyc = 0;
  always #5 clk = ~clk;

  ni_msg_tracker dut (.clk, .rst_n, .open, .open_tag, .open_npk, .close, .close_tag,
    .wd_wr, .wd_wdata, .pkt_v, .pkt_tag, .pkt_seq, .done, .done_tag, .err_dup,
    .err_extra, .err_late, .err_tag, .busy);

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (open) open_cycle = cyc;
    if (done) n_done++;
    if (err_dup) n_dup++;
    if (err_extra) n_extra++;
    if (err_late) begin n_late++; late_cycle = cyc; end
  end

  task automatic deliver(input logic [3:0] t, input int s);
    pkt_v <= 1; pkt_tag <= t; pkt_seq <= 6'(s);
    @(posedge clk);
    pkt_v <= 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int order [64];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // ---- complete messages, shuffled arrivals ----
    for (int m = 0; m < 16; m++) begin
      int np, d0;
      np = (m == 3) ? 64 : $urandom_range(1, 20);
      open <= 1; open_tag <= 4'(m); open_npk <= 7'(np);
      @(posedge clk); open <= 0;
      for (int i = 0; i < np; i++) order[i] = i;
      for (int i = np - 1; i > 0; i--) begin
        int j, t; j = $urandom_range(0, i); t = order[i]; order[i] = order[j]; order[j] = t;
      end
      d0 = n_done;
      for (int i = 0; i < np; i++) begin
        deliver(4'(m), order[i]);
        #1;
        checks++;
        if (busy[m] !== (i != np - 1)) begin failures++; $display("FAIL busy msg %0d pkt %0d", m, i); end
      end
      @(posedge clk); #1;
      checks++;
      if (n_done - d0 != 1) begin failures++; $display("FAIL msg %0d not done", m); end
    end
    checks++; if (n_dup != 0 || n_extra != 0 || n_late != 0) failures++;
    // ---- duplicate, beyond length, closed message ----
    open <= 1; open_tag <= 4'd5; open_npk <= 7'd4; @(posedge clk); open <= 0;
    deliver(5, 2);
    deliver(5, 2);
    @(posedge clk); #1;
    checks++; if (n_dup != 1 || err_tag !== 4'd5) begin failures++; $display("FAIL dup %0d", n_dup); end
    deliver(5, 9);
    deliver(6, 0);
    @(posedge clk); #1;
    checks++; if (n_extra != 2) begin failures++; $display("FAIL extra %0d", n_extra); end
    close <= 1; close_tag <= 5; @(posedge clk); close <= 0;
    // ---- watchdog ----
    wd_wr <= 1; wd_wdata <= 16'd50; @(posedge clk); wd_wr <= 0;
    open <= 1; open_tag <= 4'd9; open_npk <= 7'd3; @(posedge clk); open <= 0;
    begin
      deliver(9, 0);
      deliver(9, 2);
      repeat (80) @(posedge clk);
      #1;
      checks++;
      if (n_late != 1 || late_cycle - open_cycle != 52 || !busy[9]) begin
        failures++; $display("FAIL late %0d at %0d", n_late, late_cycle - open_cycle);
      end
    end
    deliver(9, 1);
    @(posedge clk); #1;
    checks++; if (busy[9] || n_late != 1) failures++;
    // ---- full load: 16 messages of 64 packets open at once, arrivals interleaved ----
    begin
      int pend [16][$];
      int d0, left, c0, e0;
      wd_wr <= 1; wd_wdata <= 16'hffff; @(posedge clk); wd_wr <= 0;
      for (int mo = 0; mo < 16; mo++) begin
        #1; open = 1; open_tag = 4'(mo); open_npk = 7'd64; @(posedge clk); #1; open = 0;
        for (int i = 0; i < 64; i++) pend[mo].push_back(i);
        pend[mo].shuffle();
      end
      d0 = n_done;
      e0 = n_dup + n_extra + n_late;
      left = 1024;
      c0 = cyc;
      while (left > 0) begin
        int mm, sq;
        mm = $urandom_range(0, 15);
        if (pend[mm].size() > 0) begin
          sq = pend[mm].pop_front();
          pkt_v = 1; pkt_tag = 4'(mm); pkt_seq = 6'(sq);
          @(posedge clk); #1;
          pkt_v = 0;
          left--;
        end
      end
      checks++;
      if (cyc - c0 != 1024) begin failures++; $display("FAIL full load took %0d cycles", cyc - c0); end
      @(posedge clk); #1;
      checks++;
      if (n_done - d0 != 16 || busy !== 16'h0000) begin
        failures++; $display("FAIL full load: %0d of 16 messages done", n_done - d0);
      end
      checks++;
      if (n_dup + n_extra + n_late != e0) begin failures++; $display("FAIL full load reported an error"); end
    end
    $display("done %0d dup %0d extra %0d late %0d", n_done, n_dup, n_extra, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
