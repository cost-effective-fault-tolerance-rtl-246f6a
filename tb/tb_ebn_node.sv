// tb_ebn_node -- self-checking test of the EBN wire interface.
// Every input wire, alone, must appear on heard one cycle later when listening
// and never when not; drive must appear on all five outputs one cycle later.
module tb_ebn_node;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] ebn_in = '0, ebn_out;
  logic pn_in = 0, listen = 0, drive = 0, pn_out, heard;
  always #5 clk = ~clk;

  ebn_node dut (.clk, .rst_n, .ebn_in, .pn_in, .listen, .drive, .ebn_out, .pn_out, .heard);

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    checks++; if (heard !== 0 || ebn_out !== 0 || pn_out !== 0) failures++;
    for (int w = 0; w < 5; w++) begin
      for (int l = 0; l < 2; l++) begin
        listen = l[0];
        if (w < 4) ebn_in[w] = 1; else pn_in = 1;
        #1;
        checks++; if (heard !== 0) begin failures++; $display("FAIL heard before latch"); end
        @(posedge clk); #1;
        checks++;
        if (heard !== l[0]) begin failures++; $display("FAIL wire %0d listen %0d heard %b", w, l, heard); end
        ebn_in = '0; pn_in = 0;
        @(posedge clk); #1;
        checks++; if (heard !== 0) begin failures++; $display("FAIL heard stuck"); end
      end
    end
    for (int n = 0; n < 50; n++) begin
      logic d;
      d = 1'($urandom);
      drive = d;
      @(posedge clk); #1;
      checks++;
      if (ebn_out !== {4{d}} || pn_out !== d) begin failures++; $display("FAIL drive %b out %b", d, ebn_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
