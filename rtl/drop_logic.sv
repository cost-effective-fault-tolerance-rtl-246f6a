// drop_logic -- removal of undeliverable packets after the drain timeout.
//
// When the drain times out, the Drop Packets state clears the network in two
// phases.  Phase 1 (phase1 high): every packet the router receives is marked as
// being at its destination and delivered to the local processing node, by the
// same path a header parity error takes (eject_all drives the routing decision).
// Phase 2 (one clear pulse): whatever is still in the router sits in the
// multiqueue or in an output frame, blocked by a fault.  The packet data are left
// alone; only the multiqueue scoreboard entry and the output frame's
// packet-present bit are cleared (mq_clr, of_clr).  The number of packets
// removed is reported on dropped and drop_evt, evidence of an error for the
// processing node.
//
// Interface: mq_valid/of_valid from the router datapath, phase1/clear from the
// fault-management controller.  Timing: mq_clr/of_clr are combinational with
// clear; dropped/drop_evt are registered (one cycle later).
// Follows the document: the two phases and the report.  Own choice: a 4-bit count.
module drop_logic #(
  parameter int NMQ = 5,
  parameter int NCH = 5
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           phase1,
  input  logic           clear,
  input  logic [NMQ-1:0] mq_valid,
  input  logic [NCH-1:0] of_valid,
  output logic           eject_all,
  output logic [NMQ-1:0] mq_clr,
  output logic [NCH-1:0] of_clr,
  output logic [3:0]     dropped,
  output logic           drop_evt
);

  logic [3:0] n;

  assign eject_all = phase1;
  assign mq_clr    = clear ? mq_valid : '0;
  assign of_clr    = clear ? of_valid : '0;

  always_comb begin
    n = '0;
    for (int i = 0; i < NMQ; i++) n = n + 4'(mq_clr[i]);
    for (int i = 0; i < NCH; i++) n = n + 4'(of_clr[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dropped  <= '0;
      drop_evt <= 1'b0;
    end else begin
      drop_evt <= clear && (n != '0);
      if (clear) dropped <= n;
    end
  end

endmodule
