// tb_counterflow_shift_register: 64 x 8 SFQ shift register, counterflow clock.
//
// A clock pulse enters the last stage every 3 to 9 steps. Word fed[k] is sent
// as data pulses in the step in which clock pulse k reaches stage 0, i.e.
// DEPTH-1 = 7 steps after it entered (the earliest legal step). Expected:
// clk_out pulses together with each clock pulse, q carries fed[k-8] one
// step after clock pulse k, and both are zero at all other steps.
module tb_counterflow_shift_register;
  localparam int W = 64, D = 8, N = 60;
  logic clk = 0, rst_n = 0, clk_p = 0;
  logic [W-1:0] d = '0, q;
  logic clk_out;
  logic [W-1:0] fed [N];
  logic [W-1:0] feed_at [int];
  int checks = 0, failures = 0;
  int at_clk [int];     // clock index of a step

  counterflow_shift_register #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .clk_p(clk_p), .d(d), .q(q), .clk_out(clk_out));

  always #5 clk = ~clk;

  initial begin
    int k, next;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < N; i++) fed[i] = (i % 7 == 3) ? '0 : {$urandom, $urandom};
    k = 0; next = 0;
    for (int t = 0; t < 700; t++) begin
      clk_p = 0;
      if (t == next && k < N + D + 1) begin
        clk_p = 1; at_clk[t] = k;
        if (k < N) feed_at[t + D - 1] = fed[k];
        next = t + 3 + $urandom_range(0, 6);
        k++;
      end
      d = feed_at.exists(t) ? feed_at[t] : '0;
      #1;
      begin
        bit e_clk; logic [W-1:0] e_q;
        e_clk = at_clk.exists(t);
        e_q = '0;
        if (at_clk.exists(t - 1)) begin
          int m; m = at_clk[t - 1];
          if (m >= D && m - D < N) e_q = fed[m - D];
        end
        checks++;
        if (clk_out !== e_clk) begin failures++; $display("FAIL t=%0d clk_out=%b", t, clk_out); end
        checks++;
        if (q !== e_q) begin failures++; $display("FAIL t=%0d q=%h expected %h", t, q, e_q); end
      end
      @(posedge clk); #1;
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
