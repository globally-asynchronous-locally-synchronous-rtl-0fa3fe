// tb_ring_bus: four block interfaces on a circular bus, random traffic.
//
// Every node offers packets to random destinations (including itself and
// the node before it, which the circle reaches by wrapping round) and holds
// each offer until inj_ready takes it. Expected: each packet raises match
// at its destination exactly h*(SEG_DELAY+1)+1 steps after it was taken
// (h = hops, N for a packet to itself), with that node's rx_data equal to
// its data; no other match occurs; nodes passed on the way store the data
// without a match.
module tb_ring_bus;
  import sfq_pkg::*;
  localparam int N = 4, SEG = 2;
  logic clk = 0, rst_n = 0;
  ring_pkt_t [N-1:0] inj;
  logic [N-1:0] inj_ready, node_match;
  word_t [N-1:0] node_data;
  int checks = 0, failures = 0;
  int t = 0;
  int n_wrap = 0, n_wait = 0, n_self = 0, n_seen_passing = 0;

  typedef struct { int due; word_t data; } exp_t;
  exp_t expq [N][$];
  word_t passq [N][int];   // data a passed node must hold, by step

  ring_bus #(.NODES(N), .SEG_DELAY(SEG)) dut (
    .clk(clk), .rst_n(rst_n), .inj(inj), .inj_ready(inj_ready),
    .node_data(node_data), .node_match(node_match));

  always #5 clk = ~clk;

  initial begin
    inj = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (t = 0; t < 1500; t++) begin
      // new offers where a node is idle
      for (int s = 0; s < N; s++)
        if (!inj[s].clk && t < 1300 && $urandom_range(0, 5) == 0) begin
          inj[s].clk = 1;
          inj[s].tag = tag_t'($urandom_range(0, N-1));
          inj[s].data = {$urandom, $urandom};
        end
      #1;
      // offers taken in this step
      for (int s = 0; s < N; s++) begin
        if (inj[s].clk && inj_ready[s]) begin
          int dst, h; exp_t e;
          dst = int'(inj[s].tag);
          h = (dst - s + N) % N; if (h == 0) h = N;
          if (h == N) n_self++;
          if (dst < s) n_wrap++;
          e.due = t + h * (SEG + 1) + 1; e.data = inj[s].data;
          expq[dst].push_back(e);
          for (int j = 1; j < h; j++) passq[(s + j) % N][t + j * (SEG + 1) + 1] = inj[s].data;
        end else if (inj[s].clk) n_wait++;
      end
      @(posedge clk); #1;
      for (int s = 0; s < N; s++)
        if (inj[s].clk && inj_ready[s] === 1'b1) inj[s] = NO_PKT;
      // outputs now belong to step t+1
      for (int n = 0; n < N; n++) begin
        int hit; hit = -1;
        foreach (expq[n][j]) if (expq[n][j].due == t + 1) hit = j;
        checks++;
        if (hit >= 0) begin
          if (node_match[n] !== 1'b1 || node_data[n] !== expq[n][hit].data) begin
            failures++; $display("FAIL t=%0d node %0d: match=%b data=%h expected %h", t+1, n, node_match[n], node_data[n], expq[n][hit].data);
          end
          expq[n].delete(hit);
        end else if (node_match[n] !== 1'b0) begin
          failures++; $display("FAIL t=%0d node %0d: unexpected match", t+1, n);
        end
        if (passq[n].exists(t + 1)) begin
          n_seen_passing++;
          checks++;
          if (node_data[n] !== passq[n][t + 1]) begin
            failures++; $display("FAIL t=%0d node %0d: passing data not stored", t+1, n);
          end
          passq[n].delete(t + 1);
        end
      end
    end
    for (int n = 0; n < N; n++) begin
      checks++;
      if (expq[n].size() != 0) begin failures++; $display("FAIL node %0d: %0d packets never arrived", n, expq[n].size()); end
    end
    if (!n_wrap || !n_wait || !n_self || !n_seen_passing) begin failures++; $display("FAIL: wrap/wait/self not all exercised"); end
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
