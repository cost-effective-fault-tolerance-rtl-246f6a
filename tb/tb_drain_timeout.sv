// tb_drain_timeout -- self-checking test of the drain timeout counter.
// Checks the reset limit (307200, counted out in full), a programmed limit,
// that counting pauses while run is low, that start clears, and 20 random limits
// after each of which the expiry level must hold while the drain goes on.
module tb_drain_timeout;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, run = 0, lim_wr = 0;
  logic [19:0] lim_wdata = '0;
  logic expired;
  always #5 clk = ~clk;

  drain_timeout dut (.clk, .rst_n, .start, .run, .lim_wr, .lim_wdata, .expired);

  task automatic count_to_expiry(input int exp_cycles, input bit gaps);
    int n, m;
    n = 0; m = 0;
    start <= 1; @(posedge clk); start <= 0; #1;
    while (!expired && m < 400000) begin
      logic r;
      r = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
      run <= r;
      @(posedge clk); #1;
      if (r) n++;
      m++;
    end
    run <= 0;
    checks++;
    if (n != exp_cycles) begin failures++; $display("FAIL expired after %0d counted cycles, exp %0d", n, exp_cycles); end
  endtask

  initial begin
    repeat (800000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    count_to_expiry(307200, 0);
    lim_wr <= 1; lim_wdata <= 20'd100; @(posedge clk); lim_wr <= 0;
    count_to_expiry(100, 1);
    count_to_expiry(100, 0);
    // random limits; expiry is a level that holds while the drain goes on
    for (int k = 0; k < 20; k++) begin
      int lim;
      lim = $urandom_range(1, 3000);
      lim_wr <= 1; lim_wdata <= 20'(lim); @(posedge clk); lim_wr <= 0;
      count_to_expiry(lim, k % 2 == 1);
      run <= 1; repeat (5) @(posedge clk); #1; run <= 0;
      checks++;
      if (expired !== 1'b1) begin failures++; $display("FAIL expiry not held"); end
    end
    start <= 1; @(posedge clk); start <= 0; #1;
    checks++; if (expired) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
