// config_reg -- router configuration register (functional channel mask).
//
// Nine bits written by the processing node: one "usable" bit for each of the five
// links (four network links and the processor link) and one "alive" bit for each
// of the four neighbouring processing nodes.  The link bits are the functional
// channel mask the routing decision ANDs with the profitable directions; the node
// bits record a neighbour whose processing node failed diagnostics while the link
// itself still routes.  Reconfiguration is only allowed when the network is in a
// controlled state, so a write is accepted only while wr_allow is high (the top
// level raises it during system initialisation and in the Diagnostics state); any
// other write is ignored and reported on wr_rej.
//
// Interface: wr/wdata from the processing node, link_ok/node_ok out.
// Timing: the new value is visible the cycle after the write.
// Follows the document: 9 bits, 5 links + 4 routers, written by the processing
// node after diagnostics.  Own choice: reset to all usable, the wr_allow gate.
module config_reg
  import ft_pkg::*;
#(
  parameter int CFG_W = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr,
  input  logic             wr_allow,
  input  logic [CFG_W-1:0] wdata,
  output logic [NCH-1:0]   link_ok,
  output logic [NNB-1:0]   node_ok,
  output logic             wr_rej
);

  logic [CFG_W-1:0] cfg_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_q  <= '1;
      wr_rej <= 1'b0;
    end else begin
      wr_rej <= wr && !wr_allow;
      if (wr && wr_allow) cfg_q <= wdata;
    end
  end

  assign link_ok = cfg_q[NCH-1:0];
  assign node_ok = cfg_q[NCH +: NNB];

endmodule
