// activated_clock_source: local clock source switched on by an activation pulse.
//
// The second way of using the GALS activation signal: instead of being
// distributed as the clock itself, it turns on the receiving block's own
// ring oscillator. The timing rule is then loose (the activation only has
// to arrive before the data), at the price of clock pulses that carry no
// data.
//
// An act pulse while the source is off starts the oscillator in phase with
// it: clk_p pulses in the same step and every PERIOD steps after. An act
// pulse while it runs leaves the phase alone. Either way the source stays on
// for RUN_PERIODS clock pulses, counted from the first pulse at or after
// the last activation, and then stops. How the source is switched off is not
// specified by the document; the pulse count is this design's choice.
module activated_clock_source #(
  parameter int unsigned PERIOD      = 16,
  parameter int unsigned RUN_PERIODS = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic act,
  output logic clk_p,
  output logic running
);

  localparam int unsigned CW = $clog2(RUN_PERIODS + 1);

  logic [CW-1:0] left;
  logic [CW-1:0] left_next;

  ring_oscillator #(.PERIOD(PERIOD)) u_osc (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (running || act),
    .start(act && !running),
    .clk_p(clk_p)
  );

  always_comb begin
    left_next = left;
    if (act)                 left_next = CW'(RUN_PERIODS) - CW'(clk_p);
    else if (running && clk_p) left_next = left - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left    <= '0;
      running <= 1'b0;
    end else begin
      left    <= left_next;
      running <= (left_next != '0);
    end
  end

  initial assert (RUN_PERIODS >= 1) else $error("activated_clock_source: RUN_PERIODS must be >= 1");

endmodule
