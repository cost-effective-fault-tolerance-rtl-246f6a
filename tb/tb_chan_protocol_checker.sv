// tb_chan_protocol_checker -- self-checking test of the channel context checker.
// Directed sequences: legal traffic must stay silent; each of the three illegal
// sequences must raise err with its code, one cycle after it happens.
module tb_chan_protocol_checker;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic we_own = 0, rem_want = 0, rem_ifree = 0, tx_start = 0, rem_start = 0, loc_ifree = 1;
  logic err; logic [1:0] err_code;
  int nerr = 0;
  always #5 clk = ~clk;

  chan_protocol_checker dut (.clk, .rst_n, .we_own, .rem_want, .rem_ifree, .tx_start,
                             .rem_start, .loc_ifree, .err, .err_code);

  always @(posedge clk) if (rst_n && err) nerr++;

  task automatic expect_err(input logic e, input logic [1:0] code, input string what);
    @(posedge clk); #1;
    checks++;
    if (err !== e || (e && err_code !== code)) begin
      failures++; $display("FAIL %s: err %b code %0d", what, err, err_code);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // we own; remote frame becomes free, we send a packet, frame fills: legal
    we_own <= 1; rem_ifree <= 1;           expect_err(0, 0, "own, ifree rises");
    tx_start <= 1;                          expect_err(0, 0, "tx start");
    tx_start <= 0; rem_ifree <= 0;          expect_err(0, 0, "ifree falls after tx");
    rem_ifree <= 1;                         expect_err(0, 0, "ifree rises again");
    // remote frame becomes unavailable with no packet sent: code 2
    rem_ifree <= 0;                         expect_err(1, 2, "ifree falls without tx");
    // remote wants channel, then withdraws while we keep ownership: code 1
    rem_want <= 1;                          expect_err(0, 0, "want rises");
    rem_want <= 0;                          expect_err(1, 1, "want withdrawn");
    // ownership passes to remote; it stops wanting: legal
    rem_want <= 1;                          expect_err(0, 0, "want again");
    we_own <= 0;                            expect_err(0, 0, "yield");
    rem_want <= 0;                          expect_err(0, 0, "want falls as owner");
    // remote owner starts a packet while our frame is free: legal
    rem_start <= 1; loc_ifree <= 1;         expect_err(0, 0, "start with free frame");
    rem_start <= 0; loc_ifree <= 0;         expect_err(0, 0, "frame fills");
    // remote starts another while our frame is full: code 3
    rem_start <= 1;                         expect_err(1, 3, "start with full frame");
    rem_start <= 0;                         expect_err(0, 0, "quiet");
    checks++; if (nerr != 3) begin failures++; $display("FAIL error count %0d", nerr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
