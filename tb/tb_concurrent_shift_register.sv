// tb_concurrent_shift_register: 64 x 8 SFQ shift register, concurrent clock.
//
// A clock pulse enters every T steps (T varies between 2 and 9 to show the
// register needs no fixed period). Word fed[k] is sent as data pulses one
// step after clock pulse k. Expected: clk_out pulses DEPTH-1 = 7 steps after
// each clock pulse, q carries fed[k-8] one step after that, and both are
// zero at all other steps.
module tb_concurrent_shift_register;
  localparam int W = 64, D = 8, N = 60;
  logic clk = 0, rst_n = 0, clk_p = 0;
  logic [W-1:0] d = '0, q;
  logic clk_out;
  logic [W-1:0] fed [N];
  int checks = 0, failures = 0;
  int t = 0;
  int clk_at [int];     // step of clock pulse k
  int at_clk [int];     // clock index of a step, -1 if none

  concurrent_shift_register #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .clk_p(clk_p), .d(d), .q(q), .clk_out(clk_out));

  always #5 clk = ~clk;

  initial begin
    int k, next;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < N; i++) fed[i] = (i % 7 == 3) ? '0 : {$urandom, $urandom};
    k = 0; next = 0;
    for (t = 0; t < 700; t++) begin
      clk_p = 0; d = '0;
      if (t == next && k < N + D + 1) begin
        clk_p = 1; clk_at[k] = t; at_clk[t] = k;
        next = t + 2 + $urandom_range(0, 7);
        k++;
      end
      if (k >= 1 && t == clk_at[k-1] + 1 && k - 1 < N) d = fed[k-1];
      #1;
      // clk_out at t means clock pulse at t-(D-1)
      begin
        bit e_clk; logic [W-1:0] e_q;
        e_clk = at_clk.exists(t - (D - 1));
        e_q = '0;
        if (at_clk.exists(t - D)) begin
          int m; m = at_clk[t - D];
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
