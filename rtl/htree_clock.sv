// htree_clock: zero-skew H-tree clock distribution built from SFQ splitters.
//
// A clock pulse entering at the root passes through LEVELS = clog2(LEAVES)
// levels of 1-to-2 splitters. Each splitter regenerates the pulse and drives
// two branches, and every path from the root to a leaf has the same number
// of splitters, so all leaves pulse in the same step, LEVELS steps after the
// root (one step per splitter, this design's delay choice). The binary
// splitter tree with zero skew is what the document uses for its example
// registers; LEAVES need not be a power of two (the unused branches of the
// last level are left out).
module htree_clock #(
  parameter int unsigned LEAVES = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clk_p,
  output logic [LEAVES-1:0] leaf
);

  localparam int unsigned LEVELS = (LEAVES > 1) ? $clog2(LEAVES) : 1;

  // node[l] holds the 2**(l+1) splitter outputs of level l (only the first
  // ones that lead to a leaf are used on the last level).
  logic [(1<<LEVELS)-1:0] node [LEVELS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < LEVELS; l++) node[l] <= '0;
    end else begin
      node[0] <= '0;
      node[0][1:0] <= {2{clk_p}};
      for (int l = 1; l < LEVELS; l++) begin
        node[l] <= '0;
        for (int b = 0; b < (2 << l); b++) node[l][b] <= node[l-1][b >> 1];
      end
    end
  end

  assign leaf = node[LEVELS-1][LEAVES-1:0];

endmodule
