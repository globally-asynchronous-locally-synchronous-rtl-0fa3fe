// ring_bus: shared circular SFQ bus with tagged packets.
//
// NODES block interfaces (bus_interface, identifiers 0..NODES-1) are joined
// by transmission-line segments of SEG_DELAY steps; the output of the last
// interface feeds the first, so a packet can reach any block, including the
// one before its sender. A packet takes SEG_DELAY+1 steps per hop. Every
// interface on the way stores the data; only the block whose identifier
// equals the tag raises its match pulse, and the packet leaves the ring
// there. Device ports are arrays indexed by block identifier. The circular
// topology is the document's; NODES and SEG_DELAY are this design's.
module ring_bus
  import sfq_pkg::*;
#(
  parameter int unsigned NODES     = RING_NODES,
  parameter int unsigned SEG_DELAY = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  ring_pkt_t [NODES-1:0] inj,
  output logic      [NODES-1:0] inj_ready,
  output word_t     [NODES-1:0] node_data,
  output logic      [NODES-1:0] node_match
);

  ring_pkt_t [NODES-1:0] seg_in;   // interface output, segment input
  ring_pkt_t [NODES-1:0] seg_out;  // segment output, next interface input

  for (genvar i = 0; i < NODES; i++) begin : g_node
    bus_interface #(.ID(i), .NODES(NODES)) u_if (
      .clk      (clk),
      .rst_n    (rst_n),
      .up       (seg_out[(i + NODES - 1) % NODES]),
      .down     (seg_in[i]),
      .inj      (inj[i]),
      .inj_ready(inj_ready[i]),
      .rx_data  (node_data[i]),
      .match    (node_match[i])
    );

    transmission_line #(.WIDTH($bits(ring_pkt_t)), .DELAY(SEG_DELAY)) u_seg (
      .clk  (clk),
      .rst_n(rst_n),
      .din  (seg_in[i]),
      .dout (seg_out[i])
    );
  end

  initial assert (NODES >= 2 && NODES <= (1 << TAG_W))
    else $error("ring_bus: NODES must fit the tag width");

endmodule
