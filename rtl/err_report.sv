// err_report -- private error report from the router to its processing node.
//
// Error detection in the router never triggers a broadcast by itself: it sets a
// flag that the processing node reads, and the processing node decides whether
// to assert the error-detected eureka on the EBN.  Each event input sets its
// sticky flag; the processing node clears flags by writing ones to clr.  A flag
// that is set and cleared in the same cycle stays set, so no event is lost.
//
// Interface: evt (pulses from the checkers), clr, flags, any.
// Timing: a flag is visible the cycle after its event.
// Follows the document: detection by the router, policy in the processing node.
// Own choice: the flag layout (ft_pkg E_*) and write-one-to-clear.
module err_report #(
  parameter int NERR = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NERR-1:0] evt,
  input  logic [NERR-1:0] clr,
  output logic [NERR-1:0] flags,
  output logic            any
);

  always_ff @(posedge clk) begin
    if (!rst_n) flags <= '0;
    else        flags <= (flags & ~clr) | evt;
  end

  assign any = |flags;

endmodule
