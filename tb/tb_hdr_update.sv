// tb_hdr_update -- self-checking test of the per-hop header update.
// For random displacements and each output channel, the expected dx/dy are worked
// out with integer arithmetic and the parity of the result must be even.
module tb_hdr_update;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  logic [FLIT_W-1:0] hin, hout;
  logic [2:0]        dir;

  hdr_update dut (.hdr_in(hin), .dir, .hdr_out(hout));

  initial begin
    #100000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      int dx, dy, ex, ey, gx, gy, ones;
      dx = $urandom_range(0, 120) - 60;
      dy = $urandom_range(0, 120) - 60;
      hin = {1'b0, 1'($urandom), 7'(dx), 7'(dy)};
      hin[15] = ^hin[14:0];
      for (int d = 0; d < 5; d++) begin
        dir = 3'(d);
        #1;
        ex = dx; ey = dy;
        if (d == 0) ex = dx - 1;
        if (d == 1) ex = dx + 1;
        if (d == 2) ey = dy - 1;
        if (d == 3) ey = dy + 1;
        gx = int'($signed(hout[13:7]));
        gy = int'($signed(hout[6:0]));
        ones = 0;
        for (int b = 0; b < 16; b++) ones += int'(hout[b]);
        checks++;
        if (gx != ex || gy != ey || (ones % 2) != 0 || hout[14] !== hin[14]) begin
          failures++;
          $display("FAIL dir %0d in %h out %h (dx %0d dy %0d -> %0d %0d)", d, hin, hout, dx, dy, gx, gy);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
