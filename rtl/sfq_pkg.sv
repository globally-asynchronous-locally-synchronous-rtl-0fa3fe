// sfq_pkg: constants and types shared by the pulse-level SFQ models.
//
// Every SFQ pulse in this design is modelled as a strobe that is high for
// exactly one step of the simulation time base `clk`. One step stands for
// one gate or transmission-line stage delay; `clk` is a modelling device,
// not a clock of the SFQ circuit. A logical one is a pulse inside a clock
// period, a logical zero is no pulse.
//
// The 64-bit width and the 8-stage depth of the example registers follow the
// document; the ring size (4 nodes) and the packet layout are this design's
// choice.
package sfq_pkg;

  // Example registers: 64 bits wide, 8 stages deep.
  localparam int unsigned DATA_W   = 64;
  localparam int unsigned SR_DEPTH = 8;

  // Shared ring bus: number of block interfaces and tag width.
  localparam int unsigned RING_NODES = 4;
  localparam int unsigned TAG_W      = (RING_NODES > 1) ? $clog2(RING_NODES) : 1;

  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [DATA_W-1:0] word_t;

  // A packet on the shared bus: the extra clock line that travels with the
  // data (the GALS activation line), the destination tag and the data word.
  typedef struct packed {
    logic  clk;
    tag_t  tag;
    word_t data;
  } ring_pkt_t;

  localparam ring_pkt_t NO_PKT = '0;

endpackage
