// tb_gals_sfq_top: end-to-end test of the whole design at its default size
// (64-bit, 8-deep registers, four ring nodes).
//
// All four transmitters get a clock pulse every 16 steps (the local clock
// period of link C) and one word per period, sent as data pulses 11 steps
// after the clock, with a partial repeat one step later that the flip-flops
// must absorb. Words of links B and C include empty words; link C has a run
// of empty words long enough for its clock source to stop and restart. At
// the same time the ring carries random traffic between its four nodes.
//
// Expected outputs are computed here from the link structure:
//   link A  a_rx_clk 22 steps after each transmitter clock (9 + 4 + 9),
//           a_rx_q one step later = word fed 16 periods before;
//   link B  one receiver clock per non-empty word, 22 steps after the
//           transmitter clock that sent it; b_rx_q = the non-empty word sent
//           8 receiver clocks before; none for empty words;
//   link C  receiver clock 21 steps after a transmitter clock in every period
//           in which the source runs (it starts on a non-empty word and runs
//           9 pulses after the last one); c_rx_q = word (empty or not) taken
//           8 receiver clocks before;
//   link D  d_rx_clk 13 steps after each transmitter clock (9 + 4),
//           d_rx_q one step later = word fed 16 periods before;
//   ring    each packet raises match at its destination after
//           hops*3+1 steps with its data.
// Each mechanism is counted and must occur at least once.
module tb_gals_sfq_top;
  import sfq_pkg::*;
  localparam int W = 64, D = 8, N = 4, T = 16, NW = 60, RUN = D + 1;
  localparam int PERIODS = NW + 2 * D + 12;
  localparam int T0 = 2;

  logic clk = 0, rst_n = 0;
  logic a_tx_clk = 0, b_tx_clk = 0, c_tx_clk = 0, d_tx_clk = 0;
  logic [W-1:0] a_tx_d = '0, b_tx_d = '0, c_tx_d = '0, d_tx_d = '0;
  logic [W-1:0] a_rx_q, b_rx_q, c_rx_q, d_rx_q;
  logic a_rx_clk, b_rx_clk, c_rx_clk, c_osc_on, d_rx_clk;
  ring_pkt_t [N-1:0] inj;
  logic [N-1:0] inj_ready, node_match;
  word_t [N-1:0] node_data;

  gals_sfq_top dut (
    .clk(clk), .rst_n(rst_n),
    .a_tx_clk(a_tx_clk), .a_tx_d(a_tx_d), .a_rx_q(a_rx_q), .a_rx_clk(a_rx_clk),
    .b_tx_clk(b_tx_clk), .b_tx_d(b_tx_d), .b_rx_q(b_rx_q), .b_rx_clk(b_rx_clk),
    .c_tx_clk(c_tx_clk), .c_tx_d(c_tx_d), .c_rx_q(c_rx_q), .c_rx_clk(c_rx_clk), .c_osc_on(c_osc_on),
    .d_tx_clk(d_tx_clk), .d_tx_d(d_tx_d), .d_rx_q(d_rx_q), .d_rx_clk(d_rx_clk),
    .inj(inj), .inj_ready(inj_ready), .node_data(node_data), .node_match(node_match));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int d_words = 0;
  int a_words = 0, b_words = 0, b_gated = 0, c_starts = 0, c_extra = 0, c_stops = 0,
      absorbed = 0, r_match = 0, r_wait = 0, r_wrap = 0, r_pass = 0;

  logic [W-1:0] fa [NW], fb [NW], fc [NW], fd [NW];
  // expected outputs by absolute step
  bit           ea_clk [int], eb_clk [int], ec_clk [int], ec_on [int], ed_clk [int];
  logic [W-1:0] ea_q [int], eb_q [int], ec_q [int], ed_q [int];

  function automatic logic [W-1:0] rnd_word();
    return {$urandom, $urandom};
  endfunction

  // Work out the expected link outputs period by period.
  task automatic build_expectations();
    logic [W-1:0] nz [$];
    logic [W-1:0] rc [D];
    int left; bit on;
    for (int i = 0; i < D; i++) rc[i] = '0;
    left = 0; on = 0;
    for (int m = 0; m < PERIODS; m++) begin
      int tc; logic [W-1:0] txa, txb, txc;
      tc = T0 + m * T;
      txa = (m >= D && m - D < NW) ? fa[m-D] : '0;
      txb = (m >= D && m - D < NW) ? fb[m-D] : '0;
      txc = (m >= D && m - D < NW) ? fc[m-D] : '0;
      // link A: receiver clocked every period
      ea_clk[tc + 22] = 1;
      ea_q[tc + 23] = (m >= 2 * D && m - 2 * D < NW) ? fa[m - 2 * D] : '0;
      // link D: counterflow receiver clocked every period
      ed_clk[tc + 13] = 1;
      ed_q[tc + 14] = (m >= 2 * D && m - 2 * D < NW) ? fd[m - 2 * D] : '0;
      // link B: one receiver clock per non-empty word
      if (txb != '0) begin
        eb_clk[tc + 22] = 1;
        eb_q[tc + 23] = (nz.size() >= D) ? nz[nz.size() - D] : '0;
        nz.push_back(txb);
      end
      // link C: activated local clock source
      begin
        bit act, pulse;
        act = (txc != '0);
        pulse = act || on;
        if (act && !on) c_starts++;
        if (pulse) begin
          if (!act) c_extra++;
          ec_clk[tc + 21] = 1;
          ec_q[tc + 22] = rc[D-1];
          for (int i = D - 1; i > 0; i--) rc[i] = rc[i-1];
          rc[0] = '0;
          if (act) left = RUN - 1; else left--;
          on = (left != 0);
          if (!on) c_stops++;
        end
        rc[0] |= txc;
        ec_on[tc + 14] = on;
      end
    end
  endtask

  // Ring expectations
  typedef struct { int due; word_t data; } exp_t;
  exp_t expq [N][$];
  word_t passq [N][int];

  int t;
  initial begin
    inj = '0;
    for (int k = 0; k < NW; k++) begin
      fa[k] = rnd_word();
      fd[k] = rnd_word();
      fb[k] = (k % 4 == 1 || k == 20 || k == 21) ? '0 : rnd_word();
      fc[k] = (k >= 20 && k < 34) || (k % 6 == 3) ? '0 : rnd_word();
    end
    build_expectations();
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (t = 0; t < T0 + PERIODS * T; t++) begin
      int m, r;
      m = (t - T0) / T; r = (t - T0) % T;
      a_tx_clk = (t >= T0 && r == 0);
      b_tx_clk = a_tx_clk; c_tx_clk = a_tx_clk; d_tx_clk = a_tx_clk;
      a_tx_d = '0; b_tx_d = '0; c_tx_d = '0; d_tx_d = '0;
      if (t >= T0 && m < NW) begin
        if (r == 11) begin a_tx_d = fa[m]; b_tx_d = fb[m]; c_tx_d = fc[m]; d_tx_d = fd[m]; end
        if (r == 12) begin
          a_tx_d = fa[m] & {W/4{4'h9}}; b_tx_d = fb[m] & {W/4{4'h9}}; c_tx_d = fc[m] & {W/4{4'h9}};
          if (a_tx_d != '0) absorbed++;
        end
      end
      // ring offers
      for (int s = 0; s < N; s++)
        if (!inj[s].clk && t < T0 + NW * T && $urandom_range(0, 5) == 0) begin
          inj[s].clk = 1; inj[s].tag = tag_t'($urandom_range(0, N-1)); inj[s].data = rnd_word();
        end
      #1;
      // link outputs at step t
      check_link(t);
      // ring offers taken in step t
      for (int s = 0; s < N; s++) begin
        if (inj[s].clk && inj_ready[s]) begin
          int dst, h; exp_t e;
          dst = int'(inj[s].tag);
          h = (dst - s + N) % N; if (h == 0) h = N;
          if (dst < s) r_wrap++;
          e.due = t + h * 3 + 1; e.data = inj[s].data;
          expq[dst].push_back(e);
          for (int j = 1; j < h; j++) passq[(s + j) % N][t + j * 3 + 1] = inj[s].data;
        end else if (inj[s].clk) r_wait++;
      end
      @(posedge clk); #1;
      for (int s = 0; s < N; s++)
        if (inj[s].clk && inj_ready[s] === 1'b1) inj[s] = NO_PKT;
      check_ring(t + 1);
    end
    for (int n = 0; n < N; n++) begin
      checks++;
      if (expq[n].size() != 0) begin failures++; $display("FAIL ring node %0d: %0d packets lost", n, expq[n].size()); end
    end
    for (int k = 0; k < NW; k++) if (fb[k] == '0) b_gated++;
    $display("mechanisms: d_words=%0d", d_words);
    $display("mechanisms: a_words=%0d b_words=%0d b_gated=%0d c_starts=%0d c_extra=%0d c_stops=%0d absorbed=%0d ring match=%0d wait=%0d wrap=%0d pass=%0d",
             a_words, b_words, b_gated, c_starts, c_extra, c_stops, absorbed, r_match, r_wait, r_wrap, r_pass);
    if (!a_words || !d_words || !b_words || !b_gated || !c_starts || !c_extra || !c_stops || !absorbed ||
        !r_match || !r_wait || !r_wrap || !r_pass) begin
      failures++; $display("FAIL: a mechanism was never exercised");
    end
    if (c_starts < 2) begin failures++; $display("FAIL: link C source never restarted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_link(input int tt);
    logic [W-1:0] e;
    checks++;
    if (a_rx_clk !== ea_clk.exists(tt)) begin failures++; $display("FAIL t=%0d a_rx_clk=%b", tt, a_rx_clk); end
    e = ea_q.exists(tt) ? ea_q[tt] : '0;
    checks++;
    if (a_rx_q !== e) begin failures++; $display("FAIL t=%0d a_rx_q=%h expected %h", tt, a_rx_q, e); end
    else if (e != '0) a_words++;
    checks++;
    if (b_rx_clk !== eb_clk.exists(tt)) begin failures++; $display("FAIL t=%0d b_rx_clk=%b", tt, b_rx_clk); end
    e = eb_q.exists(tt) ? eb_q[tt] : '0;
    checks++;
    if (b_rx_q !== e) begin failures++; $display("FAIL t=%0d b_rx_q=%h expected %h", tt, b_rx_q, e); end
    else if (e != '0) b_words++;
    checks++;
    if (c_rx_clk !== ec_clk.exists(tt)) begin failures++; $display("FAIL t=%0d c_rx_clk=%b", tt, c_rx_clk); end
    e = ec_q.exists(tt) ? ec_q[tt] : '0;
    checks++;
    if (c_rx_q !== e) begin failures++; $display("FAIL t=%0d c_rx_q=%h expected %h", tt, c_rx_q, e); end
    checks++;
    if (d_rx_clk !== ed_clk.exists(tt)) begin failures++; $display("FAIL t=%0d d_rx_clk=%b", tt, d_rx_clk); end
    e = ed_q.exists(tt) ? ed_q[tt] : '0;
    checks++;
    if (d_rx_q !== e) begin failures++; $display("FAIL t=%0d d_rx_q=%h expected %h", tt, d_rx_q, e); end
    else if (e != '0) d_words++;
    if (ec_on.exists(tt)) begin
      checks++;
      if (c_osc_on !== ec_on[tt]) begin failures++; $display("FAIL t=%0d c_osc_on=%b", tt, c_osc_on); end
    end
  endtask

  task automatic check_ring(input int tt);
    for (int n = 0; n < N; n++) begin
      int hit; hit = -1;
      foreach (expq[n][j]) if (expq[n][j].due == tt) hit = j;
      checks++;
      if (hit >= 0) begin
        if (node_match[n] !== 1'b1 || node_data[n] !== expq[n][hit].data) begin
          failures++; $display("FAIL t=%0d ring node %0d: match=%b data=%h", tt, n, node_match[n], node_data[n]);
        end else r_match++;
        expq[n].delete(hit);
      end else if (node_match[n] !== 1'b0) begin
        failures++; $display("FAIL t=%0d ring node %0d: unexpected match", tt, n);
      end
      if (passq[n].exists(tt)) begin
        checks++;
        if (node_data[n] !== passq[n][tt]) begin failures++; $display("FAIL t=%0d ring node %0d: passing data not stored", tt, n); end
        else r_pass++;
        passq[n].delete(tt);
      end
    end
  endtask

  initial begin
    repeat (T0 + PERIODS * T + 500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
