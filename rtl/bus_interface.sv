// bus_interface: block interface on the shared SFQ ring bus.
//
// Every packet on the ring is {clk, tag, data}; clk is the extra line that
// carries the clock with the data (the GALS scheme). The interface holds a
// hard-wired block identifier ID, so comparing the tag with it is a fixed
// pattern match, not a general comparator.
//
// For every packet arriving on up the interface stores the data word in its
// input register rx_data (all blocks see all data), and in the same step
// raises match for one step if the tag equals ID. match is the control
// pulse the block uses as write enable, handshake or clock; rx_data is valid
// while match is high and stays until the next packet passes. A matched
// packet ends here; any other packet is forwarded on down one step later
// (the regenerating stage of the line). The local device offers a packet on
// inj; it is merged into the ring in a step whose slot is free (no packet
// forwarded), which inj_ready reports, so two packets never meet on one
// line. Storing all data and pulsing on a match follow the document; taking
// matched packets off the ring and injecting only into free slots are this
// design's choices.
module bus_interface
  import sfq_pkg::*;
#(
  parameter int unsigned ID    = 0,
  parameter int unsigned NODES = RING_NODES
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ring_pkt_t up,
  output ring_pkt_t down,
  input  ring_pkt_t inj,
  output logic      inj_ready,
  output word_t     rx_data,
  output logic      match
);

  logic hit;
  logic pass;

  assign hit       = up.clk && (up.tag == tag_t'(ID));
  assign pass      = up.clk && !hit;
  assign inj_ready = !pass;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      down    <= NO_PKT;
      rx_data <= '0;
      match   <= 1'b0;
    end else begin
      match <= hit;
      if (up.clk) rx_data <= up.data;
      if (pass)         down <= up;
      else if (inj.clk) down <= inj;
      else              down <= NO_PKT;
    end
  end

  // A tag that names no block would circle the ring for ever.
  a_tag_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                inj.clk |-> (int'(inj.tag) < NODES))
    else $error("bus_interface %0d: packet for unknown block %0d", ID, inj.tag);

endmodule
