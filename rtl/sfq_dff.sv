// sfq_dff: a row of WIDTH SFQ D flip-flops (destructive readout).
//
// An SFQ D flip-flop stores one flux quantum. A data pulse on d[i] sets the
// stored bit; a clock pulse on clk_p emits a pulse on q[i] if the bit was set
// and clears it. A logical zero is the absence of a pulse. Further data
// pulses inside one clock period find the bit already set and are absorbed
// (the escape junction), so a spurious pulse corrupts only one period.
//
// Timing (one step = one strobe of the time base clk): q appears one step
// after clk_p. A data pulse arriving in the same step as the clock pulse is
// treated as arriving just after it: the old bit is read out and the new bit
// is stored. That ordering, and the one-step clock-to-output delay, are this
// design's choices; the storage behaviour is that of the SFQ flip-flop.
module sfq_dff #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  input  logic             clk_p,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= '0;
      q     <= '0;
    end else begin
      q     <= clk_p ? state : '0;
      state <= (clk_p ? '0 : state) | d;
    end
  end

endmodule
