// tb_ring_oscillator: pulses every PERIOD steps while enabled, phase reset
// by start, silent while disabled.
module tb_ring_oscillator;
  localparam int P = 7;
  logic clk = 0, rst_n = 0, en = 0, start = 0;
  logic clk_p;
  int checks = 0, failures = 0;

  ring_oscillator #(.PERIOD(P)) dut (.clk(clk), .rst_n(rst_n), .en(en), .start(start), .clk_p(clk_p));

  always #5 clk = ~clk;

  initial begin
    int ph;   // steps since the last pulse, -1 when off
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    ph = -1;
    for (int i = 0; i < 500; i++) begin
      bit e;
      // enable pattern: on for a while, off for a while, random restarts
      en    = ((i / 60) % 3) != 2;
      start = en && ($urandom_range(0, 40) == 0);
      if (!en) begin e = 0; ph = -1; end
      else if (start || ph == -1 || ph == P - 1) begin e = 1; ph = 0; end
      else begin e = 0; ph++; end
      #1;
      checks++;
      if (clk_p !== e) begin failures++; $display("FAIL step %0d clk_p=%b expected %b", i, clk_p, e); end
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
