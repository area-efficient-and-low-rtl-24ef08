// lottery_manager_tb: cycle-accurate check of the dynamic lottery arbiter.
// The testbench keeps its own model of the arbiter's state (LFSR, ticket
// counts, current grant, burst counter), computes every lottery from the
// request map and tickets, and compares the grant every cycle. Phases:
//   1. the document's example, request map 1011 with tickets 1:3:4 on masters
//      1, 3 and 4, held for many lotteries: the share of wins must follow the
//      tickets and master 2 must never win;
//   2. a single request on an idle bus must be granted after one cycle;
//   3. random request traffic, with run-time ticket changes (including zero
//      tickets), early releases and bursts cut at MAX_BURST cycles.
module lottery_manager_tb;
  localparam int N = 4, MAXB = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0;
  logic tkt_wr_en = 0;
  logic [1:0] tkt_wr_idx = 0;
  logic [3:0] tkt_wr_val = 0;
  logic [3:0] tickets [N];
  logic [N-1:0] gnt;
  logic bus_free;
  logic [6:0] draw, total;

  // model state
  logic [7:0] m_lfsr;
  logic [3:0] m_tkt [N];
  logic [N-1:0] m_gnt;
  int m_cnt;
  int checks = 0, failures = 0;
  int wins [N];
  int draws_with_winner = 0, cap_hits = 0, early_releases = 0, zero_ticket_draws = 0;
  int phase = 0;

  lottery_manager dut (.clk, .rst_n, .req, .tkt_wr_en, .tkt_wr_idx, .tkt_wr_val,
                       .tickets, .gnt, .bus_free, .draw, .total);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // reference lottery: winner for the current request map
  function automatic logic [N-1:0] model_winner(logic [N-1:0] r, logic [7:0] lf);
    int t = 0, s = 0, x;
    for (int i = 0; i < N; i++) if (r[i]) t += m_tkt[i];
    if (t == 0) return '0;
    x = lf % t;
    for (int i = 0; i < N; i++) begin
      if (r[i]) s += m_tkt[i];
      if (x < s) return N'(1 << i);
    end
    return '0;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update and comparison at every clock edge
  always @(posedge clk) begin
    if (rst_n) begin
      bit active, free;
      logic [N-1:0] w;
      check(gnt == m_gnt, $sformatf("t=%0t grant got %b want %b", $time, gnt, m_gnt));
      active = |(m_gnt & req);
      free   = !active || (m_cnt == MAXB - 1);
      check(bus_free == free, "bus_free");
      if (active && m_cnt == MAXB - 1) cap_hits++;
      if (!active && m_gnt != 0) early_releases++;
      if (free) begin
        w = model_winner(req, m_lfsr);
        if (w != 0) begin
          draws_with_winner++;
          for (int i = 0; i < N; i++) if (w[i] && phase == 1) wins[i]++;
          for (int i = 0; i < N; i++) if (req[i] && m_tkt[i] == 0) zero_ticket_draws++;
        end
        m_gnt = w;
        m_cnt = 0;
      end else m_cnt++;
      m_lfsr = (m_lfsr == 0) ? 8'h5A : {m_lfsr[6:0], m_lfsr[7] ^ m_lfsr[5] ^ m_lfsr[4] ^ m_lfsr[3]};
      if (tkt_wr_en) m_tkt[tkt_wr_idx] = tkt_wr_val;
    end
  end

  initial begin
    int lat;
    m_lfsr = 8'h5A; m_gnt = 0; m_cnt = 0;
    m_tkt = '{4'd1, 4'd2, 4'd3, 4'd4};
    for (int i = 0; i < N; i++) wins[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // phase 1: request map 1011 (masters 1, 3, 4) held continuously
    phase = 1;
    req <= 4'b1101;            // bit i = master i+1: masters 1, 3, 4
    repeat (MAXB * 800) @(posedge clk);
    phase = 0;
    req <= 0;
    repeat (3) @(posedge clk);
    begin
      int tot;
      tot = wins[0] + wins[2] + wins[3];
      check(wins[1] == 0, "master 2 did not request and must not win");
      check(tot > 700, $sformatf("lotteries drawn: %0d", tot));
      // expected shares 1/8, 3/8, 4/8 (30% tolerance)
      check(wins[0] * 8 > tot * 7 / 10 && wins[0] * 8 < tot * 13 / 10, $sformatf("master 1 wins %0d of %0d", wins[0], tot));
      check(wins[2] * 8 > tot * 3 * 7 / 10 && wins[2] * 8 < tot * 3 * 13 / 10, $sformatf("master 3 wins %0d of %0d", wins[2], tot));
      check(wins[3] * 8 > tot * 4 * 7 / 10 && wins[3] * 8 < tot * 4 * 13 / 10, $sformatf("master 4 wins %0d of %0d", wins[3], tot));
      $display("INFO wins at 1:3:4 = %0d %0d %0d %0d", wins[0], wins[1], wins[2], wins[3]);
    end
    // phase 2: grant latency from an idle bus
    for (int i = 0; i < N; i++) begin
      @(negedge clk) req = N'(1 << i);
      lat = 0;
      do begin @(posedge clk); #1 lat++; end while (gnt == 0 && lat < 10);
      check(gnt == N'(1 << i) && lat == 1, $sformatf("idle-bus latency master %0d: %0d cycles", i, lat));
      @(negedge clk) req = 0;
      repeat (2) @(posedge clk);
    end
    // phase 3: random traffic and ticket changes
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++)
        if ($urandom_range(0, 4) == 0) req[i] = ~req[i];
      tkt_wr_en  = ($urandom_range(0, 15) == 0);
      tkt_wr_idx = 2'($urandom_range(0, 3));
      tkt_wr_val = ($urandom_range(0, 3) == 0) ? 4'd0 : 4'($urandom_range(1, 15));
    end
    @(negedge clk) tkt_wr_en = 0; req = 0;
    repeat (3) @(posedge clk);
    check(cap_hits > 0, "burst limit reached");
    check(early_releases > 0, "owner released early");
    check(zero_ticket_draws > 0, "draw with a zero-ticket requester");
    $display("INFO draws=%0d cap_hits=%0d early_releases=%0d zero_ticket_draws=%0d",
             draws_with_winner, cap_hits, early_releases, zero_ticket_draws);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
