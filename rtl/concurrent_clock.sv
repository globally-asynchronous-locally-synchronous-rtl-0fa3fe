// concurrent_clock: clock line that travels with the data through a pipeline.
//
// In concurrent clocking the clock pulse enters at the first stage and moves
// along the stages in the direction of the data. Stage k receives the pulse
// k*STAGE_DELAY steps after stage 0; tap[0] is the input pulse itself. Each
// section of the line is a splitter feeding the local flip-flops and a short
// delay line to the next stage. The concurrent scheme is the document's; the
// one-step stage delay (matching the one-step clock-to-output delay of
// sfq_dff) is this design's choice.
module concurrent_clock #(
  parameter int unsigned STAGES      = 8,
  parameter int unsigned STAGE_DELAY = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clk_p,
  output logic [STAGES-1:0] tap
);

  assign tap[0] = clk_p;

  for (genvar k = 1; k < STAGES; k++) begin : g_stage
    transmission_line #(.WIDTH(1), .DELAY(STAGE_DELAY)) u_seg (
      .clk (clk),
      .rst_n(rst_n),
      .din (tap[k-1]),
      .dout(tap[k])
    );
  end

endmodule
