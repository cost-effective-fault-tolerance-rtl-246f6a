// tb_config_reg -- self-checking test of the configuration register.
// Checks the reset value, that writes land only while allowed, that refused
// writes are reported, and the split into link and node bits.
module tb_config_reg;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr = 0, wr_allow = 0;
  logic [8:0] wdata = '0;
  logic [NCH-1:0] link_ok;
  logic [NNB-1:0] node_ok;
  logic wr_rej;
  logic [8:0] model;
  always #5 clk = ~clk;

  config_reg dut (.clk, .rst_n, .wr, .wr_allow, .wdata, .link_ok, .node_ok, .wr_rej);

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    model = 9'h1FF;
    checks++; if ({node_ok, link_ok} !== model) failures++;
    for (int n = 0; n < 200; n++) begin
      logic w, a; logic [8:0] d;
      w = 1'($urandom); a = 1'($urandom); d = 9'($urandom);
      wr <= w; wr_allow <= a; wdata <= d;
      @(posedge clk);
      wr <= 0;
      if (w && a) model = d;
      #1;
      checks++;
      if ({node_ok, link_ok} !== model || wr_rej !== (w && !a)) begin
        failures++;
        $display("FAIL w %b a %b d %h -> %h rej %b", w, a, d, {node_ok, link_ok}, wr_rej);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
