// ebn_node -- one node of the one-wire Express Broadcast Network (EBN).
//
// The EBN is a separate, very cheap control network: one unidirectional wire in
// each direction of every link, plus a wire each way to the processing node.  A
// broadcast is a single asserted bit.  Every node listens to all its inputs; a
// node that hears an assertion re-drives all its outputs, so the wavefront floods
// every connected node along all paths at once and flows around any number of
// broken links.  The meaning of the bit depends only on the current
// fault-management state, so broadcasts from several sources merge harmlessly.
//
// This block is the node's wire interface: an input latch per wire (four
// neighbour links and the processor link), the OR of the latched inputs gated by
// listen (heard), and output registers that copy drive to all four neighbour
// links and to the processing node.  Which state listens and which drives is the
// fault-management controller's job.
//
// Timing: an input asserted in cycle t is latched at t+1 and seen on heard in that
// cycle; the controller's drive is registered here, so one hop (wire plus node)
// costs two cycles, the pipelined figure the document gives.
// Follows the document: single wire per link, 1-bit input latch per channel,
// listen/rebroadcast.  Own choice: registered outputs, listen gating at the OR.
module ebn_node #(
  parameter int NNB = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NNB-1:0] ebn_in,
  input  logic           pn_in,
  input  logic           listen,
  input  logic           drive,
  output logic [NNB-1:0] ebn_out,
  output logic           pn_out,
  output logic           heard
);

  logic [NNB:0] in_q;
  logic         drv_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_q  <= '0;
      drv_q <= 1'b0;
    end else begin
      in_q  <= {pn_in, ebn_in};
      drv_q <= drive;
    end
  end

  assign heard   = listen && (in_q != '0);
  assign ebn_out = {NNB{drv_q}};
  assign pn_out  = drv_q;

endmodule
