// tb_err_report -- self-checking test of the sticky error flags.
// Random events and clears against a model; set-and-clear in one cycle keeps the flag.
module tb_err_report;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [5:0] evt = '0, clr = '0, flags, model;
  logic any;
  always #5 clk = ~clk;

  err_report #(.NERR(6)) dut (.clk, .rst_n, .evt, .clr, .flags, .any);

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    model = '0;
    checks++; if (flags !== 0 || any) failures++;
    for (int n = 0; n < 500; n++) begin
      logic [5:0] e, c;
      e = 6'($urandom) & 6'($urandom) & 6'($urandom);
      c = 6'($urandom) & 6'($urandom);
      evt = e; clr = c;
      @(posedge clk); #1;
      model = (model & ~c) | e;
      checks++;
      if (flags !== model || any !== (model != 0)) begin failures++; $display("FAIL %b exp %b", flags, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
