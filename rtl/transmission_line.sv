// transmission_line: a bundle of WIDTH pulse lines with a fixed delay.
//
// Models a Josephson transmission line (pulses regenerated at every stage)
// or a passive transmission line (pulses travel ballistically), used both
// as interconnect and as a deliberate delay line. Several pulses may be in
// flight at once (wave pipelining): a pulse entering on din leaves on dout
// exactly DELAY steps later, whatever else is travelling. The delay in steps
// is a parameter; the physical length and speed are outside the model.
// DELAY must be at least 1.
module transmission_line #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DELAY = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] line [DELAY];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DELAY; i++) line[i] <= '0;
    end else begin
      line[0] <= din;
      for (int i = 1; i < DELAY; i++) line[i] <= line[i-1];
    end
  end

  assign dout = line[DELAY-1];

  initial assert (DELAY >= 1) else $error("transmission_line: DELAY must be >= 1");

endmodule
