// tb_sfq_dff: self-checking test of the SFQ flip-flop row.
//
// Directed cases (store and read, empty read, two data pulses in one period,
// data in the same step as the clock) and a random pulse stream. The
// expected output is worked out from the flip-flop's rule: the clock pulse
// reads out what arrived since the previous clock pulse, one step later.
module tb_sfq_dff;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d = '0, q;
  logic clk_p = 0;
  int checks = 0, failures = 0;

  sfq_dff #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .clk_p(clk_p), .q(q));

  always #5 clk = ~clk;

  // One step: apply inputs, clock, return.
  task automatic step(input logic [W-1:0] dv, input logic cp);
    d = dv; clk_p = cp;
    @(posedge clk); #1;
    d = '0; clk_p = 0;
  endtask

  task automatic expect_q(input logic [W-1:0] e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, e);
    end
  endtask

  logic [W-1:0] acc;
  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    // store then read
    step(8'hA5, 0); step('0, 0); step('0, 1);
    expect_q(8'hA5, "store/read");
    step('0, 0); expect_q('0, "one-step pulse");
    // empty period
    step('0, 1); expect_q('0, "empty read");
    // two data pulses on the same line in one period: still one stored quantum
    step(8'h01, 0); step(8'h01, 0); step(8'h10, 0); step('0, 1);
    expect_q(8'h11, "double pulse absorbed");
    // data in the clock step: old value out, new value kept for next period
    step(8'h3C, 0); step(8'hC3, 1); expect_q(8'h3C, "same-step read");
    step('0, 1); expect_q(8'hC3, "same-step store");
    // random stream against the reading rule
    acc = '0;
    for (int i = 0; i < 400; i++) begin
      logic [W-1:0] dv; logic cp; logic [W-1:0] e;
      dv = ($urandom_range(0, 2) == 0) ? W'($urandom) : '0;
      cp = ($urandom_range(0, 3) == 0);
      e  = cp ? acc : '0;
      acc = (cp ? '0 : acc) | dv;
      step(dv, cp);
      expect_q(e, "random");
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
