// counterflow_clock: clock line running against the data direction.
//
// In counterflow clocking the clock pulse enters at the last stage of a
// pipeline and travels towards the first, one delay element per stage.
// tap[STAGES-1] is the input pulse itself; stage k receives it
// (STAGES-1-k)*STAGE_DELAY steps later. A stage is thus always clocked
// before the stage that feeds it, so a word can never race through two
// stages on one clock pulse, whatever the delays. The scheme is one of the
// receiving-block options named in the reference design; the one-step
// stage delay is this design's choice.
module counterflow_clock #(
  parameter int unsigned STAGES      = 8,
  parameter int unsigned STAGE_DELAY = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clk_p,
  output logic [STAGES-1:0] tap
);

  assign tap[STAGES-1] = clk_p;

  for (genvar k = STAGES - 2; k >= 0; k--) begin : g_stage
    transmission_line #(.WIDTH(1), .DELAY(STAGE_DELAY)) u_seg (
      .clk  (clk),
      .rst_n(rst_n),
      .din  (tap[k+1]),
      .dout (tap[k])
    );
  end

endmodule
