// htree_shift_register: WIDTH-bit, DEPTH-stage SFQ shift register, H-tree clocked.
//
// An array of DEPTH x WIDTH SFQ D flip-flops (sfq_dff, one per bit). Every
// flip-flop has its own leaf of a zero-skew H-tree (htree_clock), so a clock
// pulse at clk_p reaches all bits of all stages in the same step, LEVELS =
// clog2(WIDTH*DEPTH) steps later (9 for 64 x 8). On that step each stage reads
// out its word to the next stage, which stores it one step later; a word
// entering at d therefore appears at q after DEPTH clock pulses.
//
// clk_out is the leaf clock of the last stage, brought out so it can be
// bundled with the data bus as the GALS clock line; the word it reads out
// appears on q one step after clk_out. Clock pulses must be at least two
// steps apart. Size and H-tree clocking follow the document; the step
// delays are this design's choices.
module htree_shift_register #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clk_p,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             clk_out
);

  localparam int unsigned LEAVES = WIDTH * DEPTH;

  logic [LEAVES-1:0] leaf;
  logic [WIDTH-1:0]  stage_q [DEPTH];

  htree_clock #(.LEAVES(LEAVES)) u_tree (
    .clk  (clk),
    .rst_n(rst_n),
    .clk_p(clk_p),
    .leaf (leaf)
  );

  for (genvar s = 0; s < DEPTH; s++) begin : g_stage
    for (genvar b = 0; b < WIDTH; b++) begin : g_bit
      sfq_dff #(.WIDTH(1)) u_ff (
        .clk  (clk),
        .rst_n(rst_n),
        .d    ((s == 0) ? d[b] : stage_q[(s == 0) ? 0 : s-1][b]),
        .clk_p(leaf[s*WIDTH + b]),
        .q    (stage_q[s][b])
      );
    end
  end

  assign q       = stage_q[DEPTH-1];
  assign clk_out = leaf[LEAVES-1];

endmodule
