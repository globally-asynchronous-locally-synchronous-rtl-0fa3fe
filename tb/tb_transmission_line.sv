// tb_transmission_line: checks that every pulse leaves the line exactly
// DELAY steps after it entered, with several pulses in flight at once.
module tb_transmission_line;
  localparam int W = 4, DLY = 5;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  transmission_line #(.WIDTH(W), .DELAY(DLY)) dut (.clk(clk), .rst_n(rst_n), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < DLY; i++) hist.push_back('0);
    for (int i = 0; i < 300; i++) begin
      din = ($urandom_range(0, 1) == 0) ? W'($urandom) : '0;
      hist.push_back(din);
      @(posedge clk); #1;
      // after this edge, dout shows what entered DLY steps ago
      void'(hist.pop_front());
      checks++;
      if (dout !== hist[0]) begin
        failures++;
        $display("FAIL step %0d: dout=%h expected %h", i, dout, hist[0]);
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
