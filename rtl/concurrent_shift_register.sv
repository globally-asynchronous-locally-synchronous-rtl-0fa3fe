// concurrent_shift_register: WIDTH-bit, DEPTH-stage SFQ shift register with
// a concurrent clock network.
//
// The clock pulse enters at clk_p (in the GALS links this is the activation
// signal that arrives with the data) and travels along the stages through
// concurrent_clock, one step per stage, in the same direction as the data.
// Stage k is a row of WIDTH SFQ flip-flops clocked in step t+k. The word it
// reads out reaches stage k+1 in step t+k+1, together with that stage's clock
// pulse, and is stored behind it, so each clock wave moves every word one
// stage on. A word stored in stage 0 appears at q after DEPTH clock pulses.
// clk_out is the clock at the last stage; it follows clk_p by DEPTH-1 steps,
// and the word it reads out appears on q one step after it. Clock pulses must be at least
// two steps apart. Structure from the document; step delays are this
// design's choices.
module concurrent_shift_register #(
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

  logic [DEPTH-1:0] tap;
  logic [WIDTH-1:0] stage_q [DEPTH];

  concurrent_clock #(.STAGES(DEPTH), .STAGE_DELAY(1)) u_clk (
    .clk  (clk),
    .rst_n(rst_n),
    .clk_p(clk_p),
    .tap  (tap)
  );

  for (genvar s = 0; s < DEPTH; s++) begin : g_stage
    sfq_dff #(.WIDTH(WIDTH)) u_row (
      .clk  (clk),
      .rst_n(rst_n),
      .d    ((s == 0) ? d : stage_q[(s == 0) ? 0 : s-1]),
      .clk_p(tap[s]),
      .q    (stage_q[s])
    );
  end

  assign q       = stage_q[DEPTH-1];
  assign clk_out = tap[DEPTH-1];

endmodule
