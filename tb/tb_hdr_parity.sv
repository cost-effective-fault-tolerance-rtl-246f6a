// tb_hdr_parity -- self-checking test of the header parity checker.
// Random header flits on all five frames, with and without hdr_v; the expected
// error is computed bit by bit with a loop, independently of the XOR tree.
module tb_hdr_parity;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  logic [NCH-1:0]             hdr_v;
  logic [NCH-1:0][FLIT_W-1:0] hdr_flit;
  logic [NCH-1:0]             par_err;
  int nerr = 0;

  hdr_parity dut (.hdr_v, .hdr_flit, .par_err);

  initial begin
    #100000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      for (int c = 0; c < NCH; c++) begin
        hdr_flit[c] = 16'($urandom);
        hdr_v[c]    = ($urandom_range(0, 3) != 0);
      end
      #1;
      for (int c = 0; c < NCH; c++) begin
        int ones;
        ones = 0;
        for (int b = 0; b < 16; b++) ones += int'(hdr_flit[c][b]);
        checks++;
        if (par_err[c] !== (hdr_v[c] && (ones % 2 == 1))) begin
          failures++;
          $display("FAIL flit %h v %b err %b", hdr_flit[c], hdr_v[c], par_err[c]);
        end
        if (par_err[c]) nerr++;
      end
    end
    checks++;
    if (nerr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
