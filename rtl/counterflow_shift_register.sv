// counterflow_shift_register: WIDTH-bit, DEPTH-stage SFQ shift register with
// a counterflow clock network.
//
// The clock pulse enters at the last stage (clk_p) and runs back towards
// stage 0 through counterflow_clock, one step per stage; stage k is clocked
// DEPTH-1-k steps after clk_p. Each stage therefore reads out its word before
// the word from the stage behind it arrives, and every clock wave moves all
// words one stage on. clk_out is the clock of the last stage (equal to
// clk_p); the word it reads out appears on q one step later, DEPTH clock
// pulses after it entered. Stage 0 is clocked DEPTH-1 steps after clk_p, so
// the next word must reach d at or after that step and before stage 0's next
// clock pulse. Clock pulses must be at least three steps apart: a word leaves
// stage k-1 two steps after stage k was clocked and must be stored before
// stage k's next clock pulse reads it. The counterflow
// scheme is named in the reference design as a receiver option; the
// structure and delays here are this design's.
module counterflow_shift_register #(
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

  counterflow_clock #(.STAGES(DEPTH), .STAGE_DELAY(1)) u_clk (
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
