// tb_drop_logic -- self-checking test of the packet drop logic.
// Random multiqueue / output-frame occupancy; on clear every occupied entry must
// be cleared and counted, nothing must be cleared otherwise; phase1 must reach
// eject_all.
module tb_drop_logic;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, phase1 = 0, clear = 0;
  logic [4:0] mq_valid = '0, of_valid = '0, mq_clr, of_clr;
  logic eject_all, drop_evt;
  logic [3:0] dropped;
  always #5 clk = ~clk;

  drop_logic dut (.clk, .rst_n, .phase1, .clear, .mq_valid, .of_valid, .eject_all,
                  .mq_clr, .of_clr, .dropped, .drop_evt);

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      logic [4:0] m, o; logic c, p; int cnt;
      m = 5'($urandom); o = 5'($urandom); c = ($urandom_range(0, 2) == 0); p = 1'($urandom);
      if (n == 0) begin m = '0; o = '0; c = 1; end
      mq_valid = m; of_valid = o; clear = c; phase1 = p;
      #1;
      checks++;
      if (mq_clr !== (c ? m : 5'b0) || of_clr !== (c ? o : 5'b0) || eject_all !== p) begin
        failures++; $display("FAIL clr %b %b", mq_clr, of_clr);
      end
      cnt = $countones(m) + $countones(o);
      @(posedge clk); #1;
      checks++;
      if (drop_evt !== (c && cnt != 0) || (c && dropped !== 4'(cnt))) begin
        failures++; $display("FAIL count %0d exp %0d evt %b", dropped, cnt, drop_evt);
      end
      clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
