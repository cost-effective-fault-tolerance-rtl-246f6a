// tb_flit_counter -- self-checking test of the packet length check.
// Packets of 1..20 flits (EOM on the last) must pass; a packet of 21 flits or
// more must raise err and abort exactly once, one cycle after the 21st flit,
// and the rest of it must be discarded.  Idle cycles between flits are random.
module tb_flit_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, flit_v = 0, eom = 0;
  logic [4:0] cnt;
  logic abort, err;
  int nerr = 0, nabort = 0;
  always #5 clk = ~clk;

  flit_counter dut (.clk, .rst_n, .flit_v, .eom, .cnt, .abort, .err);

  always @(posedge clk) if (rst_n) begin
    if (err) nerr++;
    if (abort) nabort++;
  end

  task automatic send(input int len);
    int e0;
    e0 = nerr;
    for (int i = 1; i <= len; i++) begin
      while ($urandom_range(0, 3) == 0) begin flit_v <= 0; @(posedge clk); end
      flit_v <= 1; eom <= (i == len);
      @(posedge clk);
      flit_v <= 0; eom <= 0;
      #1;
      // err is visible one cycle after the 21st flit
      checks++;
      if (err !== (i == 21)) begin
        failures++; $display("FAIL len %0d flit %0d err %b", len, i, err);
      end
    end
    @(posedge clk); #1;
    checks++;
    if ((nerr - e0) != (len > 20 ? 1 : 0)) begin
      failures++; $display("FAIL len %0d errors %0d", len, nerr - e0);
    end
    checks++;
    if (cnt !== 0) begin failures++; $display("FAIL count not cleared: %0d", cnt); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int len = 1; len <= 20; len++) send(len);
    send(21);
    send(5);
    send(27);
    send(20);
    checks++; if (nabort != 2) begin failures++; $display("FAIL aborts %0d", nabort); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
