// tb_concurrent_clock: a pulse entering the line reaches stage k exactly k
// steps later; several pulses travel at once.
module tb_concurrent_clock;
  localparam int S = 8;
  logic clk = 0, rst_n = 0, clk_p = 0;
  logic [S-1:0] tap;
  logic ins [int];
  int checks = 0, failures = 0;

  concurrent_clock #(.STAGES(S), .STAGE_DELAY(1)) dut (.clk(clk), .rst_n(rst_n), .clk_p(clk_p), .tap(tap));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      clk_p = ($urandom_range(0, 2) == 0);
      ins[t] = clk_p;
      #1;
      // tap[k] now (time t) must equal the input at time t-k
      for (int k = 0; k < S; k++) begin
        logic e;
        e = (t - k >= 0) ? ins[t-k] : 1'b0;
        checks++;
        if (tap[k] !== e) begin failures++; $display("FAIL t=%0d tap%0d=%b exp %b", t, k, tap[k], e); end
      end
      @(posedge clk); #1;
    end
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
