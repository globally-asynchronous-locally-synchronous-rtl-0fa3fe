// tb_htree_clock: a root pulse must reach all 512 leaves in the same step,
// clog2(512) = 9 steps later, and no leaf may pulse at any other time.
module tb_htree_clock;
  localparam int LEAVES = 512, LAT = 9;
  logic clk = 0, rst_n = 0, clk_p = 0;
  logic [LEAVES-1:0] leaf;
  int checks = 0, failures = 0;
  int t = 0;
  int roots [$];

  htree_clock #(.LEAVES(LEAVES)) dut (.clk(clk), .rst_n(rst_n), .clk_p(clk_p), .leaf(leaf));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (t = 0; t < 200; t++) begin
      clk_p = (t % 7 == 0) || (t == 50) || (t == 51);
      if (clk_p) roots.push_back(t);
      @(posedge clk); #1;
      clk_p = 0;
      // leaf value after this edge corresponds to time t+1
      checks++;
      if (roots.size() > 0 && roots[0] + LAT == t + 1) begin
        void'(roots.pop_front());
        if (leaf !== '1) begin failures++; $display("FAIL t=%0d: not all leaves pulsed", t+1); end
      end else if (leaf !== '0) begin
        failures++; $display("FAIL t=%0d: stray leaf pulse", t+1);
      end
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
