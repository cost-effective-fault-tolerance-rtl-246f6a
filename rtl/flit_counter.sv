// flit_counter -- packet length sanity check on one input frame.
//
// On a Chaos channel a flit crosses every cycle of a transmission and only the
// end-of-message (EOM) signal marks the end of the packet.  If EOM is lost, the
// receiver would accept a packet of unbounded length.  This counter counts the
// flits of the packet being received; EOM (given with the last flit) restarts
// it.  A flit arriving after the twentieth without EOM means the packet is too
// long: the counter pulses err and abort (the input frame terminates the
// reception) and then discards flits until the next EOM, counting nothing.
//
// Interface: flit_v/eom per received flit; cnt shows flits received so far.
// Timing: err/abort are registered, one cycle after the offending flit.
// Follows the document: 5-bit counter, 20-flit maximum, terminate and flag.
// Own choice: EOM travels with the last flit; discard-until-EOM after an abort.
module flit_counter #(
  parameter int MAX_FLITS = 20,
  parameter int CNT_W     = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flit_v,
  input  logic             eom,
  output logic [CNT_W-1:0] cnt,
  output logic             abort,
  output logic             err
);

  logic discard;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      discard <= 1'b0;
      abort   <= 1'b0;
      err     <= 1'b0;
    end else begin
      abort <= 1'b0;
      err   <= 1'b0;
      if (flit_v) begin
        if (discard) begin
          if (eom) discard <= 1'b0;
        end else if (cnt == CNT_W'(MAX_FLITS)) begin
          // the 21st flit: the packet did not end after the 20th
          abort <= 1'b1;
          err   <= 1'b1;
          cnt   <= '0;
          discard <= !eom;
        end else if (eom) begin
          cnt <= '0;
        end else begin
          cnt <= cnt + CNT_W'(1);
        end
      end
    end
  end

endmodule
