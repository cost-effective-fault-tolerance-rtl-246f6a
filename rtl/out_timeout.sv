// out_timeout -- output frame wait timeout, one counter per output channel.
//
// The channel rules (yield to a side that alone can transmit, no two packets in
// a row while the other side has one waiting) together with the bounded stay of
// a packet in an input frame bound the time an output frame can wait for
// ownership of its channel.  Each counter runs while its output frame holds a
// packet that has not been granted the channel (of_wait) and restarts whenever
// the wait ends.  When a counter reaches the programmable limit the channel's
// err bit pulses once; the counter then stays at the limit until the wait ends.
// The limit lives in one 8-bit register shared by all channels and written by the
// processing node.
//
// Interface: of_wait per channel, lim_wr/lim_wdata, err per channel.
// Timing: err pulses in the cycle after the limit-th waiting cycle.
// Follows the document: 8-bit counter per channel plus one 8-bit limit register.
// Own choice: reset value of the limit (LIMIT_RST).
module out_timeout #(
  parameter int NCH       = 5,
  parameter int CNT_W     = 8,
  parameter int LIMIT_RST = 255
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NCH-1:0]   of_wait,
  input  logic             lim_wr,
  input  logic [CNT_W-1:0] lim_wdata,
  output logic [NCH-1:0]   err
);

  logic [CNT_W-1:0] limit_q;
  logic [CNT_W-1:0] cnt_q [NCH];

  always_ff @(posedge clk) begin
    if (!rst_n) limit_q <= CNT_W'(LIMIT_RST);
    else if (lim_wr) limit_q <= lim_wdata;
  end

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        cnt_q[c] <= '0;
        err[c]   <= 1'b0;
      end else begin
        err[c] <= 1'b0;
        if (!of_wait[c]) begin
          cnt_q[c] <= '0;
        end else if (cnt_q[c] != limit_q) begin
          cnt_q[c] <= cnt_q[c] + CNT_W'(1);
          if (cnt_q[c] + CNT_W'(1) == limit_q) err[c] <= 1'b1;
        end
      end
    end
  end

endmodule
