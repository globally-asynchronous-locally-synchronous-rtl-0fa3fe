// tb_activated_clock_source: an activation pulse starts the local clock in
// phase with itself; the source then gives RUN clock pulses counted from
// the first pulse at or after the last activation and stops. Activations
// while running extend the run without moving the phase.
module tb_activated_clock_source;
  localparam int P = 8, RUN = 3;
  logic clk = 0, rst_n = 0, act = 0;
  logic clk_p, running;
  int checks = 0, failures = 0;
  int starts = 0, extensions = 0, stops = 0;

  activated_clock_source #(.PERIOD(P), .RUN_PERIODS(RUN)) dut (
    .clk(clk), .rst_n(rst_n), .act(act), .clk_p(clk_p), .running(running));

  always #5 clk = ~clk;

  initial begin
    bit on; int ph, left;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    on = 0; ph = 0; left = 0;
    for (int i = 0; i < 800; i++) begin
      bit e;
      act = ($urandom_range(0, 29) == 0);
      // reference model
      if (!on) begin
        e = act;
        if (act) begin on = 1; ph = 0; left = RUN - 1; starts++; end
      end else begin
        ph = (ph + 1) % P;
        e = (ph == 0);
        if (act) begin left = RUN - (e ? 1 : 0); extensions++; end
        else if (e) left--;
      end
      #1;
      checks++;
      if (clk_p !== e) begin failures++; $display("FAIL step %0d clk_p=%b expected %b", i, clk_p, e); end
      if (on && left == 0) begin on = 0; stops++; end
      @(posedge clk); #1;
      checks++;
      if (running !== on) begin failures++; $display("FAIL step %0d running=%b expected %b", i, running, on); end
    end
    if (starts == 0 || extensions == 0 || stops == 0) begin failures++; $display("FAIL: start/extend/stop not all seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
