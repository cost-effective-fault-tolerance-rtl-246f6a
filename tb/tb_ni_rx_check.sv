// tb_ni_rx_check -- self-checking test of the delivery check.
// Packets addressed to this node or to another, with good or bad checksum
// (driven by the tb in place of the checksum unit): misdeliv must fire for a wrong
// destination, random or one bit off, and pkt_v only for a correct and intact packet,
// with the fields read from the header.
module tb_ni_rx_check;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [9:0] my_id = 10'd77;
  logic rx_v = 0, rx_sop = 0, csum_done = 0, csum_err = 0;
  logic [15:0] rx_flit = '0;
  logic misdeliv, pkt_v, pkt_multi;
  logic [3:0] pkt_tag; logic [5:0] pkt_seq; logic [9:0] pkt_src;
  int nmis = 0;
  always #5 clk = ~clk;

  ni_rx_check dut (.clk, .rst_n, .my_id, .rx_v, .rx_sop, .rx_flit, .csum_done, .csum_err,
                   .misdeliv, .pkt_v, .pkt_multi, .pkt_tag, .pkt_seq, .pkt_src);

  always @(posedge clk) if (rst_n && misdeliv) nmis++;

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      logic [9:0] dst, src; logic [5:0] seq; logic [3:0] tag; logic mul, bad; int len, m0, sel;
      sel = $urandom_range(0, 3);
      // wrong destinations: random, or differing from this node in a single bit
      dst = (sel == 0) ? 10'($urandom) : (sel == 1) ? (my_id ^ (10'd1 << $urandom_range(0, 9))) : my_id;
      src = 10'($urandom); seq = 6'($urandom); tag = 4'($urandom); mul = 1'($urandom);
      bad = ($urandom_range(0, 3) == 0);
      len = $urandom_range(5, 20);
      m0 = nmis;
      for (int i = 0; i < len; i++) begin
        rx_v <= 1; rx_sop <= (i == 0);
        rx_flit <= (i == 1) ? {dst, seq} : (i == 2) ? {src, tag, mul, 1'b0} : 16'($urandom);
        @(posedge clk);
      end
      rx_v <= 0;
      csum_done <= 1; csum_err <= bad;
      #1;
      checks++;
      if ((nmis - m0) != int'(dst != my_id)) begin failures++; $display("FAIL misdeliv count"); end
      @(posedge clk); #1;
      checks++;
      if (pkt_v !== (!bad && dst == my_id)) begin failures++; $display("FAIL pkt_v %b", pkt_v); end
      checks++;
      if (pkt_seq !== seq || pkt_tag !== tag || pkt_src !== src || pkt_multi !== mul) begin
        failures++; $display("FAIL fields");
      end
      csum_done <= 0; csum_err <= 0;
      @(posedge clk);
    end
    checks++; if (nmis == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
