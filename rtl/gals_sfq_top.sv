// gals_sfq_top: GALS clock activation links and shared ring bus for SFQ logic.
//
// Five independent parts stand side by side; each has its own ports.
//
// Link A (H-tree to H-tree): a transmitting shift register, clocked through
// its own H-tree, sends its 64-bit output and the clock of its last stage as
// one bundle. The clock line, after CLK_LINK_DELAY steps, is the root clock
// of the receiving register's H-tree, so the receiver needs no clock of its
// own. The data lines are given the delay of that clock path (line plus
// receiving H-tree) plus one step, so each word reaches the receiver just
// after the clock pulse that frees its first stage.
//
// Link B (H-tree to concurrent, clock gated by data): the transmitter clock,
// delayed two steps so that it follows its data, and the output word drive
// an AND-OR activation gate. Only periods that carry at least one data
// pulse produce an activation pulse; after ACT_LINE_DELAY steps of delay
// line it is the concurrent clock of the receiver. The data path gets the
// matching delay, so the receiver takes one clock per non-empty word and
// empty words are dropped.
//
// Link C (activation switches on a local clock source): as link B, but the
// activation pulse turns on the receiver's own ring oscillator
// (activated_clock_source), which then clocks the receiver's H-tree every
// OSC_PERIOD steps for RUN_PERIODS pulses after the last activation. Empty
// words are kept and extra clock pulses occur. The transmitter must be
// clocked every OSC_PERIOD steps while it sends.
//
// Link D (H-tree to counterflow): as link A, but the receiver is clocked
// counterflow: the bundled clock enters its last stage and runs back to the
// first, one of the other receiver clocking options. Its data lines carry
// CLK_LINK_DELAY + DEPTH - 1 steps of delay, so words reach the first stage
// one step after the clock wave does.
//
// Ring: the shared circular bus with NODES block interfaces (ring_bus).
//
// Timing: every port is pulse coded on the time base clk (one step per gate
// delay, see sfq_pkg). The transmitters' clock pulses must be at least two
// steps apart (links A and B), three steps apart (link D) and, for link C,
// exactly OSC_PERIOD apart. The
// structure of each link follows the document; all step delays are this
// design's choices.
module gals_sfq_top
  import sfq_pkg::*;
#(
  parameter int unsigned WIDTH          = DATA_W,
  parameter int unsigned DEPTH          = SR_DEPTH,
  parameter int unsigned NODES          = RING_NODES,
  parameter int unsigned CLK_LINK_DELAY = 4,
  parameter int unsigned ACT_LINE_DELAY = 3,
  parameter int unsigned OSC_PERIOD     = 16,
  parameter int unsigned RUN_PERIODS    = SR_DEPTH + 1,
  parameter int unsigned SEG_DELAY      = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // Link A
  input  logic                  a_tx_clk,
  input  logic [WIDTH-1:0]      a_tx_d,
  output logic [WIDTH-1:0]      a_rx_q,
  output logic                  a_rx_clk,
  // Link B
  input  logic                  b_tx_clk,
  input  logic [WIDTH-1:0]      b_tx_d,
  output logic [WIDTH-1:0]      b_rx_q,
  output logic                  b_rx_clk,
  // Link C
  input  logic                  c_tx_clk,
  input  logic [WIDTH-1:0]      c_tx_d,
  output logic [WIDTH-1:0]      c_rx_q,
  output logic                  c_rx_clk,
  output logic                  c_osc_on,
  // Link D
  input  logic                  d_tx_clk,
  input  logic [WIDTH-1:0]      d_tx_d,
  output logic [WIDTH-1:0]      d_rx_q,
  output logic                  d_rx_clk,
  // Ring bus
  input  ring_pkt_t [NODES-1:0] inj,
  output logic      [NODES-1:0] inj_ready,
  output word_t     [NODES-1:0] node_data,
  output logic      [NODES-1:0] node_match
);

  // Splitter levels of an H-tree over WIDTH*DEPTH flip-flops.
  localparam int unsigned LEVELS   = (WIDTH * DEPTH > 1) ? $clog2(WIDTH * DEPTH) : 1;
  // Data-path delays chosen so that data reach the receiving first stage one
  // step after its clock pulse.
  localparam int unsigned A_DATA_DELAY = CLK_LINK_DELAY + LEVELS;
  localparam int unsigned B_DATA_DELAY = ACT_LINE_DELAY + 3;
  localparam int unsigned C_DATA_DELAY = LEVELS + 3;
  localparam int unsigned D_DATA_DELAY = CLK_LINK_DELAY + DEPTH - 1;

  // ---------------------------------------------------------------- Link A
  logic [WIDTH-1:0] a_q, a_q_far;
  logic             a_clk_out, a_clk_far;

  htree_shift_register #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_a_tx (
    .clk(clk), .rst_n(rst_n), .clk_p(a_tx_clk), .d(a_tx_d), .q(a_q), .clk_out(a_clk_out)
  );
  transmission_line #(.WIDTH(1), .DELAY(CLK_LINK_DELAY)) u_a_clk_line (
    .clk(clk), .rst_n(rst_n), .din(a_clk_out), .dout(a_clk_far)
  );
  transmission_line #(.WIDTH(WIDTH), .DELAY(A_DATA_DELAY)) u_a_data_line (
    .clk(clk), .rst_n(rst_n), .din(a_q), .dout(a_q_far)
  );
  htree_shift_register #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_a_rx (
    .clk(clk), .rst_n(rst_n), .clk_p(a_clk_far), .d(a_q_far), .q(a_rx_q), .clk_out(a_rx_clk)
  );

  // ---------------------------------------------------------------- Link B
  logic [WIDTH-1:0] b_q, b_q_far;
  logic             b_clk_out, b_clk_follow, b_act, b_act_far;

  htree_shift_register #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_b_tx (
    .clk(clk), .rst_n(rst_n), .clk_p(b_tx_clk), .d(b_tx_d), .q(b_q), .clk_out(b_clk_out)
  );
  transmission_line #(.WIDTH(1), .DELAY(2)) u_b_follow (
    .clk(clk), .rst_n(rst_n), .din(b_clk_out), .dout(b_clk_follow)
  );
  clock_activation #(.WIDTH(WIDTH)) u_b_act (
    .clk(clk), .rst_n(rst_n), .d(b_q), .clk_p(b_clk_follow), .act(b_act)
  );
  transmission_line #(.WIDTH(1), .DELAY(ACT_LINE_DELAY)) u_b_act_line (
    .clk(clk), .rst_n(rst_n), .din(b_act), .dout(b_act_far)
  );
  transmission_line #(.WIDTH(WIDTH), .DELAY(B_DATA_DELAY)) u_b_data_line (
    .clk(clk), .rst_n(rst_n), .din(b_q), .dout(b_q_far)
  );
  concurrent_shift_register #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_b_rx (
    .clk(clk), .rst_n(rst_n), .clk_p(b_act_far), .d(b_q_far), .q(b_rx_q), .clk_out(b_rx_clk)
  );

  // ---------------------------------------------------------------- Link C
  logic [WIDTH-1:0] c_q, c_q_far;
  logic             c_clk_out, c_clk_follow, c_act, c_local_clk;

  htree_shift_register #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_c_tx (
    .clk(clk), .rst_n(rst_n), .clk_p(c_tx_clk), .d(c_tx_d), .q(c_q), .clk_out(c_clk_out)
  );
  transmission_line #(.WIDTH(1), .DELAY(2)) u_c_follow (
    .clk(clk), .rst_n(rst_n), .din(c_clk_out), .dout(c_clk_follow)
  );
  clock_activation #(.WIDTH(WIDTH)) u_c_act (
    .clk(clk), .rst_n(rst_n), .d(c_q), .clk_p(c_clk_follow), .act(c_act)
  );
  activated_clock_source #(.PERIOD(OSC_PERIOD), .RUN_PERIODS(RUN_PERIODS)) u_c_src (
    .clk(clk), .rst_n(rst_n), .act(c_act), .clk_p(c_local_clk), .running(c_osc_on)
  );
  transmission_line #(.WIDTH(WIDTH), .DELAY(C_DATA_DELAY)) u_c_data_line (
    .clk(clk), .rst_n(rst_n), .din(c_q), .dout(c_q_far)
  );
  htree_shift_register #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_c_rx (
    .clk(clk), .rst_n(rst_n), .clk_p(c_local_clk), .d(c_q_far), .q(c_rx_q), .clk_out(c_rx_clk)
  );

  // ---------------------------------------------------------------- Link D
  logic [WIDTH-1:0] d_q, d_q_far;
  logic             d_clk_out, d_clk_far;

  htree_shift_register #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_d_tx (
    .clk(clk), .rst_n(rst_n), .clk_p(d_tx_clk), .d(d_tx_d), .q(d_q), .clk_out(d_clk_out)
  );
  transmission_line #(.WIDTH(1), .DELAY(CLK_LINK_DELAY)) u_d_clk_line (
    .clk(clk), .rst_n(rst_n), .din(d_clk_out), .dout(d_clk_far)
  );
  transmission_line #(.WIDTH(WIDTH), .DELAY(D_DATA_DELAY)) u_d_data_line (
    .clk(clk), .rst_n(rst_n), .din(d_q), .dout(d_q_far)
  );
  counterflow_shift_register #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_d_rx (
    .clk(clk), .rst_n(rst_n), .clk_p(d_clk_far), .d(d_q_far), .q(d_rx_q), .clk_out(d_rx_clk)
  );

  // ---------------------------------------------------------------- Ring
  ring_bus #(.NODES(NODES), .SEG_DELAY(SEG_DELAY)) u_ring (
    .clk(clk), .rst_n(rst_n), .inj(inj), .inj_ready(inj_ready),
    .node_data(node_data), .node_match(node_match)
  );

endmodule
