// clock_activation: AND-OR clock activation gate of the GALS scheme.
//
// The data pulses a transmitting block sends in one clock period are merged
// (OR) into one stored flux quantum; the transmitter's clock pulse, which
// follows the data, reads it out (AND). The result is one activation pulse
// on act for every period in which at least one data pulse was sent, and
// none for an empty period, so the receiver is clocked exactly once per word
// that carries data and not at all otherwise.
//
// Timing: act appears one step after clk_p. Data pulses arriving in the same
// step as clk_p count for the next period. The AND-OR function is the
// document's; its realisation as a clocked gate with this ordering is this
// design's choice.
module clock_activation #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  input  logic             clk_p,
  output logic             act
);

  sfq_dff #(.WIDTH(1)) u_and (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (|d),
    .clk_p(clk_p),
    .q    (act)
  );

endmodule
