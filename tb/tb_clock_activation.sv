// tb_clock_activation: AND-OR activation gate.
//
// Random data pulses and clock pulses. Expected: act pulses one step after
// a clock pulse exactly when at least one data pulse arrived since the
// previous clock pulse (data in the clock's own step count for the next
// period), and is zero otherwise.
module tb_clock_activation;
  localparam int W = 64;
  logic clk = 0, rst_n = 0, clk_p = 0;
  logic [W-1:0] d = '0;
  logic act;
  int checks = 0, failures = 0;
  int gated = 0, fired = 0;

  clock_activation #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .clk_p(clk_p), .act(act));

  always #5 clk = ~clk;

  initial begin
    bit seen, e;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    seen = 0; e = 0;
    for (int i = 0; i < 600; i++) begin
      clk_p = ($urandom_range(0, 3) == 0);
      d = '0;
      if ($urandom_range(0, 5) == 0) d[$urandom_range(0, W-1)] = 1'b1;
      if ($urandom_range(0, 9) == 0) d = {$urandom, $urandom};
      #1;
      checks++;
      if (act !== e) begin failures++; $display("FAIL step %0d act=%b expected %b", i, act, e); end
      if (clk_p) begin
        e = seen;
        if (seen) fired++; else gated++;
        seen = (d != '0);
      end else begin
        e = 0;
        seen = seen || (d != '0);
      end
      @(posedge clk); #1;
    end
    if (gated == 0 || fired == 0) begin failures++; $display("FAIL: both outcomes not exercised"); end
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
