// chan_protocol_checker -- context check of one channel's control signals.
//
// Much of what drives the Chaos channel protocol is known only to one side, so
// most odd-looking sequences are legal.  This checker flags only the sequences
// that can never be legal:
//   code 1  the non-owner stops asking for the channel while this router kept
//           ownership.  Asking means its output frame is full, and only a
//           transmission of its own (which needs ownership) can empty it;
//   code 2  the non-owner withdraws "input frame available" although this router
//           started no packet toward it since the frame became free;
//   code 3  the remote owner starts a packet while this router has no input
//           frame free.
// A second copy of the checker in the neighbour watches this router the same way.
//
// Interface: we_own, rem_want, rem_ifree (non-owner's control lines as seen
// here), tx_start (this router starts a packet on the channel), rem_start (the
// remote owner starts one), loc_ifree (this router's input frame is free).
// err pulses with err_code in the cycle after the violation.
// Follows the document: the three unambiguous checks of the channel controller.
// Own choice: the signal-level encoding, the error codes, two bits of history
// plus the "packet sent since the frame became free" flag.
module chan_protocol_checker (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we_own,
  input  logic       rem_want,
  input  logic       rem_ifree,
  input  logic       tx_start,
  input  logic       rem_start,
  input  logic       loc_ifree,
  output logic       err,
  output logic [1:0] err_code
);

  logic own_q, want_q, ifree_q, sent_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      own_q    <= 1'b0;
      want_q   <= 1'b0;
      ifree_q  <= 1'b0;
      sent_q   <= 1'b0;
      err      <= 1'b0;
      err_code <= 2'd0;
    end else begin
      own_q   <= we_own;
      want_q  <= rem_want;
      ifree_q <= rem_ifree;
      // remember a packet sent toward the remote input frame since it was freed
      if (rem_ifree && !ifree_q) sent_q <= tx_start;
      else if (tx_start)         sent_q <= 1'b1;
      err      <= 1'b0;
      err_code <= 2'd0;
      if (rem_start && !loc_ifree) begin
        err <= 1'b1;  err_code <= 2'd3;
      end else if (we_own && own_q && ifree_q && !rem_ifree && !sent_q && !tx_start) begin
        err <= 1'b1;  err_code <= 2'd2;
      end else if (we_own && own_q && want_q && !rem_want) begin
        err <= 1'b1;  err_code <= 2'd1;
      end
    end
  end

endmodule
