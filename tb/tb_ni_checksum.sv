// tb_ni_checksum -- self-checking test of the end-to-end checksum.
// Random packets (2..18 data flits after the header flit): the transmit sum must
// equal an independently computed modulo-2^32 sum of the static flits; the same
// packet with that sum appended must pass the receive check; a packet with one
// flipped bit (in a static flit or in the checksum) must fail it.  The header
// flit is changed in flight and must not matter.
module tb_ni_checksum;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic tx_v = 0, tx_sop = 0, rx_v = 0, rx_sop = 0, rx_eop = 0;
  logic [15:0] tx_flit = '0, rx_flit = '0;
  logic [31:0] tx_sum;
  logic rx_done, rx_err;
  int n_ok = 0, n_bad = 0, n_done = 0;
  logic last_err = 0;
  always #5 clk = ~clk;

  ni_checksum dut (.clk, .rst_n, .tx_v, .tx_sop, .tx_flit, .tx_sum,
                   .rx_v, .rx_sop, .rx_eop, .rx_flit, .rx_done, .rx_err);

  always @(posedge clk) if (rst_n && rx_done) begin n_done++; last_err = rx_err; end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] pkt [20];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      int len, flip, fbit, d0;
      longint ref_sum;
      logic [31:0] got;
      len = $urandom_range(3, 18);   // flits before the checksum
      ref_sum = 0;
      for (int i = 0; i < len; i++) begin
        pkt[i] = 16'($urandom);
        if (i > 0) ref_sum += longint'(pkt[i]);
      end
      // transmit
      for (int i = 0; i < len; i++) begin
        tx_v <= 1; tx_sop <= (i == 0); tx_flit <= pkt[i];
        #1;
        #1;
        if (i == len - 1) got = tx_sum;
        @(posedge clk);
      end
      tx_v <= 0;
      checks++;
      if (got !== 32'(ref_sum)) begin failures++; $display("FAIL tx sum %h exp %h", got, 32'(ref_sum)); end
      pkt[len] = got[31:16];
      pkt[len + 1] = got[15:0];
      pkt[0] = 16'($urandom);                 // header rewritten in flight
      flip = (n % 3 == 2) ? $urandom_range(1, len + 1) : -1;
      fbit = $urandom_range(0, 15);
      if (flip >= 0) pkt[flip][fbit] = ~pkt[flip][fbit];
      d0 = n_done;
      // receive
      for (int i = 0; i < len + 2; i++) begin
        rx_v <= 1; rx_sop <= (i == 0); rx_eop <= (i == len + 1); rx_flit <= pkt[i];
        @(posedge clk);
        while ($urandom_range(0, 4) == 0) begin rx_v <= 0; @(posedge clk); end
      end
      rx_v <= 0; rx_eop <= 0;
      @(posedge clk); #1;
      checks++;
      if (n_done - d0 != 1 || last_err !== (flip >= 0)) begin
        failures++; $display("FAIL rx done %0d err %b flip %0d", n_done - d0, last_err, flip);
      end
      if (last_err) n_bad++; else n_ok++;
      @(posedge clk);
    end
    checks++; if (n_ok == 0 || n_bad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
