// ring_oscillator: local SFQ clock source.
//
// While en is high the source emits one pulse on clk_p every PERIOD steps.
// A start pulse (with en) restarts the phase: clk_p pulses in that same step
// and every PERIOD steps after it. Raising en without start also pulses at
// once. The document only says that a simple junction ring oscillator is
// enough for a digital block's clock; the ring is modelled here by a step
// counter, and the period is a parameter of this design.
module ring_oscillator #(
  parameter int unsigned PERIOD = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic start,
  output logic clk_p
);

  localparam int unsigned PW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [PW-1:0] phase;

  assign clk_p = en && (start || phase == '0);

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      phase <= '0;
    end else if (start) begin
      phase <= PW'(1);
    end else if (phase == PW'(PERIOD - 1)) begin
      phase <= '0;
    end else begin
      phase <= phase + 1'b1;
    end
  end

  initial assert (PERIOD >= 2) else $error("ring_oscillator: PERIOD must be >= 2");

endmodule
