// tb_htree_shift_register: 64 x 8 H-tree clocked SFQ shift register.
//
// A root clock pulse is applied every T = 16 steps. In period k the word
// fed[k] is sent as data pulses at relative steps 11 and 12 (the second
// burst repeats some of the pulses, which must be absorbed); every fifth
// word is all zero. Expected, worked out from the splitter depth and the
// register depth: clk_out pulses exactly 9 steps (clog2(512) splitter
// levels) after the root pulse, q shows fed[k-8] one step after that, and
// both are zero at every other step.
module tb_htree_shift_register;
  localparam int W = 64, D = 8, T = 16, LAT = 9, N = 40;
  logic clk = 0, rst_n = 0, clk_p = 0;
  logic [W-1:0] d = '0, q;
  logic clk_out;
  logic [W-1:0] fed [N];
  int checks = 0, failures = 0;

  htree_shift_register #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .clk_p(clk_p), .d(d), .q(q), .clk_out(clk_out));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what, input int k, input int r);
    checks++;
    if (!ok) begin failures++; $display("FAIL period %0d step %0d: %s", k, r, what); end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int k = 0; k < N; k++) fed[k] = (k % 5 == 0) ? '0 : {$urandom, $urandom};
    for (int k = 0; k < N + D + 1; k++) begin
      for (int r = 0; r < T; r++) begin
        // inputs for step r of period k
        clk_p = (r == 0);
        d = '0;
        if (k < N && r == 11) d = fed[k];
        if (k < N && r == 12) d = fed[k] & {W/2{2'b01}};
        #1;
        // outputs at step r (registered values from earlier steps)
        if (r == LAT) check(clk_out === 1'b1, "clk_out missing", k, r);
        else          check(clk_out === 1'b0, "stray clk_out", k, r);
        if (r == LAT + 1)
          check(q === ((k >= D && k - D < N) ? fed[k-D] : '0), $sformatf("q=%h", q), k, r);
        else
          check(q === '0, $sformatf("stray q=%h", q), k, r);
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
