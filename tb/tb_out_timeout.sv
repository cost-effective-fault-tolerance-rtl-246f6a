// tb_out_timeout -- self-checking test of the output frame wait timeout.
// A cycle-level model (counter per channel, restart when the wait ends, one
// pulse when the limit is reached) runs beside the block under random waits and
// limit writes; the expired-at-exactly-limit timing is checked separately.
module tb_out_timeout;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, lim_wr = 0;
  logic [4:0] of_wait = '0, err;
  logic [7:0] lim_wdata = '0;
  int mcnt [5];
  int mlim;
  int nto = 0;
  always #5 clk = ~clk;

  out_timeout dut (.clk, .rst_n, .of_wait, .lim_wr, .lim_wdata, .err);

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // directed: limit 10, channel 2 waits 10 cycles -> err right after the 10th
    lim_wr <= 1; lim_wdata <= 8'd10;
    @(posedge clk);
    lim_wr <= 0;
    of_wait <= 5'b00100;
    for (int i = 1; i <= 12; i++) begin
      @(posedge clk); #1;
      checks++;
      if (err !== ((i == 10) ? 5'b00100 : 5'b00000)) begin
        failures++; $display("FAIL directed cycle %0d err %b", i, err);
      end
    end
    of_wait <= '0;
    @(posedge clk);
    // random against a model
    mlim = 10;
    for (int i = 0; i < 5; i++) mcnt[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [4:0] w, exp_err;
      w = 5'($urandom) | 5'($urandom);
      of_wait <= w;
      @(posedge clk); #1;
      exp_err = '0;
      for (int c = 0; c < 5; c++) begin
        if (!w[c]) mcnt[c] = 0;
        else if (mcnt[c] != mlim) begin
          mcnt[c]++;
          if (mcnt[c] == mlim) exp_err[c] = 1;
        end
      end
      checks++;
      if (err !== exp_err) begin failures++; $display("FAIL n %0d err %b exp %b", n, err, exp_err); end
      if (err != 0) nto++;
    end
    checks++; if (nto == 0) failures++;
    $display("timeouts %0d", nto);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
