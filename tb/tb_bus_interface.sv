// tb_bus_interface: one block interface with identifier 2.
//
// Random ring traffic on up and random offers on inj. Expected, one step
// after each input step: match = packet on up with tag 2; rx_data = data
// of the last packet seen on up (whatever its tag); down = the packet on up
// if its tag is not 2, else the offered inj packet, else nothing; inj_ready
// low exactly when a packet is being forwarded.
module tb_bus_interface;
  import sfq_pkg::*;
  localparam int MY_ID = 2;
  logic clk = 0, rst_n = 0;
  ring_pkt_t up = NO_PKT, inj = NO_PKT, down;
  logic inj_ready, match;
  word_t rx_data;
  int checks = 0, failures = 0;
  int n_match = 0, n_pass = 0, n_inject = 0, n_block = 0;

  bus_interface #(.ID(MY_ID), .NODES(4)) dut (
    .clk(clk), .rst_n(rst_n), .up(up), .down(down), .inj(inj), .inj_ready(inj_ready),
    .rx_data(rx_data), .match(match));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what, input int i);
    checks++;
    if (!ok) begin failures++; $display("FAIL step %0d: %s", i, what); end
  endtask

  initial begin
    word_t last; ring_pkt_t e_down; bit e_match, e_ready;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    last = '0;
    for (int i = 0; i < 800; i++) begin
      up = NO_PKT; inj = NO_PKT;
      if ($urandom_range(0, 1) == 0) begin
        up.clk = 1; up.tag = tag_t'($urandom_range(0, 3)); up.data = {$urandom, $urandom};
      end
      if ($urandom_range(0, 2) == 0) begin
        inj.clk = 1; inj.tag = tag_t'($urandom_range(0, 3)); inj.data = {$urandom, $urandom};
      end
      e_match = up.clk && (up.tag == tag_t'(MY_ID));
      e_ready = !(up.clk && !e_match);
      if (up.clk && !e_match) begin e_down = up; n_pass++; if (inj.clk) n_block++; end
      else if (inj.clk) begin e_down = inj; n_inject++; end
      else e_down = NO_PKT;
      if (e_match) n_match++;
      if (up.clk) last = up.data;
      #1;
      chk(inj_ready === e_ready, "inj_ready", i);
      @(posedge clk); #1;
      chk(match === e_match, "match", i);
      chk(rx_data === last, "rx_data", i);
      chk(down === e_down, $sformatf("down=%h expected %h", down, e_down), i);
    end
    if (!n_match || !n_pass || !n_inject || !n_block) begin failures++; $display("FAIL: case not exercised"); end
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
