// lottery_soc_tb: end-to-end test of the shared-bus SoC at its default size.
// Four behavioural bus masters each run a series of bus requests of 1 to 6
// words, mixing writes (each master writes only its own two memory words) and
// reads (of any word). A memory model kept by the testbench from what the
// masters drove checks every read value. Along the way the run
//   - measures the grant latency of a lone request on an idle bus (1 cycle),
//   - sets master 3's tickets to zero for a while, during which it must not be
//     granted, then restores them (a run-time ticket change),
//   - checks that the grant is one-hot and only given to requesters,
//   - counts contended lotteries, bursts cut at the limit, early releases,
//     reads, writes and ticket changes, and fails any that never happened,
//   - checks that every master completes all of its requests (no starvation).
module lottery_soc_tb;
  import soc_pkg::*;
  localparam int N = N_MASTERS, TXNS = 60;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] m_req;
  bus_cmd_t m_cmd [N];
  logic [N-1:0] m_gnt;
  logic [DATA_W-1:0] bus_rdata;
  logic tkt_wr_en = 0;
  logic [1:0] tkt_wr_idx = 0;
  logic [TICKET_W-1:0] tkt_wr_val = 0;
  bus_cmd_t bus_cmd;
  logic bus_valid, bus_free;
  logic [6:0] lottery_draw, lottery_total;
  logic [TICKET_W-1:0] tickets [N];

  lottery_soc dut (.clk, .rst_n, .m_req, .m_cmd, .m_gnt, .bus_rdata,
                   .tkt_wr_en, .tkt_wr_idx, .tkt_wr_val,
                   .bus_cmd, .bus_valid, .bus_free, .lottery_draw, .lottery_total, .tickets);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // testbench memory model
  logic [DATA_W-1:0] model [MEM_DEPTH];

  // master state
  bit     run = 0;
  int     done    [N];       // requests completed
  int     words   [N];       // words left in the current request
  int     idle    [N];       // idle cycles before the next request
  int     wait_c  [N];       // cycles waited for the current grant
  int     wait_sum[N], grants[N];
  bit     waiting [N];
  int     n_contended = 0, n_cap = 0, n_early = 0, n_reads = 0, n_writes = 0;
  int     n_tkt_change = 0, n_zero_excl = 0, burst_len = 0, owner = -1;
  bit     new_grant = 0, prev_zero = 0;
  bit     probe = 0;           // lone read of word 0 by master 1 before the run

  function automatic bus_cmd_t new_cmd(int i);
    bus_cmd_t c;
    c.we = ($urandom_range(0, 1) == 1);
    c.addr = c.we ? ADDR_W'(2 * i + $urandom_range(0, 1)) : ADDR_W'($urandom_range(0, MEM_DEPTH - 1));
    c.wdata = DATA_W'($urandom);
    return c;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog; done = %0d %0d %0d %0d", done[0], done[1], done[2], done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus observer: protocol checks, data checks, mechanism counters
  always @(posedge clk) begin
    if (rst_n) begin
      logic [N-1:0] xfer;
      xfer = m_gnt & m_req;
      // a grant drawn at the last edge from zero tickets must never appear
      if (new_grant && prev_zero && m_req[2]) begin
        n_zero_excl++;
        check(!m_gnt[2], "zero-ticket master granted");
      end
      check($onehot0(m_gnt), "grant one-hot");
      if (xfer != 0) begin
        int i;
        bus_cmd_t c;
        i = $clog2(xfer);
        c = m_cmd[i];
        check(bus_valid && bus_cmd == c, "owner command on the bus");
        if (c.we) begin
          model[c.addr[2:0]] = c.wdata;
          n_writes++;
        end else begin
          check(bus_rdata == model[c.addr[2:0]],
                $sformatf("read word %0d got %h want %h", c.addr, bus_rdata, model[c.addr[2:0]]));
          n_reads++;
        end
        if (owner == i && !new_grant) burst_len++; else burst_len = 1;
        owner = i;
        check(burst_len <= MAX_BURST, "burst longer than the limit");
        if (burst_len == MAX_BURST) n_cap++;
      end else begin
        check(!bus_valid, "bus idle without an owner");
        if (owner >= 0 && burst_len < MAX_BURST) n_early++;
        owner = -1; burst_len = 0;
      end
      new_grant = bus_free;
      if (bus_free && $countones(m_req) > 1 && lottery_total != 0) n_contended++;
      prev_zero = (tickets[2] == 0);
    end
  end

  // behavioural masters
  always @(posedge clk) begin
    if (!rst_n || !run) begin
      m_req <= {{(N-1){1'b0}}, probe};
      for (int i = 0; i < N; i++) m_cmd[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (m_req[i]) begin
          if (waiting[i]) wait_c[i]++;
          if (m_gnt[i]) begin
            if (waiting[i]) begin
              wait_sum[i] += wait_c[i]; grants[i]++; waiting[i] = 0;
            end
            words[i]--;
            if (words[i] == 0) begin
              m_req[i] <= 0;
              done[i]++;
              idle[i] = $urandom_range(0, 6);
            end else m_cmd[i] <= new_cmd(i);
          end
        end else if (done[i] < TXNS) begin
          if (idle[i] > 0) idle[i]--;
          else begin
            words[i] = $urandom_range(1, 6);
            m_req[i] <= 1;
            m_cmd[i] <= new_cmd(i);
            waiting[i] = 1; wait_c[i] = 0;
          end
        end
      end
    end
  end

  // re-request after a burst cut: the owner keeps req high and waits again
  always @(negedge clk) begin
    for (int i = 0; i < N; i++)
      if (rst_n && run && m_req[i] && !m_gnt[i] && !waiting[i]) begin
        waiting[i] = 1; wait_c[i] = 0;
      end
  end

  initial begin
    int lat;
    for (int i = 0; i < MEM_DEPTH; i++) model[i] = 0;
    for (int i = 0; i < N; i++) begin
      done[i] = 0; words[i] = 0; idle[i] = i; wait_sum[i] = 0; grants[i] = 0; waiting[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // lone request on an idle bus: one read of word 0, granted after one cycle
    @(negedge clk) probe = 1;
    @(posedge clk);            // request now registered
    lat = 0;
    do begin @(posedge clk); #1 lat++; end while (m_gnt == 0 && lat < 10);
    check(m_gnt == 4'b0001 && lat == 1, $sformatf("idle-bus grant latency %0d", lat));
    check(bus_rdata == 0, "word 0 clear after reset");
    @(negedge clk) probe = 0;
    @(negedge clk);
    run = 1;
    // after a while master 3 loses its tickets, later gets them back
    repeat (400) @(posedge clk);
    @(negedge clk) begin tkt_wr_en = 1; tkt_wr_idx = 2; tkt_wr_val = 0; end
    @(negedge clk) tkt_wr_en = 0;
    n_tkt_change++;
    check(tickets[2] == 0 && tickets[0] == 1 && tickets[1] == 2 && tickets[3] == 4,
          "tickets after setting master 3 to zero");
    repeat (300) @(posedge clk);
    @(negedge clk) begin tkt_wr_en = 1; tkt_wr_idx = 2; tkt_wr_val = 3; end
    @(negedge clk) tkt_wr_en = 0;
    n_tkt_change++;
    check(tickets[2] == 3 && tickets[3] == 4, "tickets after restoring master 3");
    wait (done[0] == TXNS && done[1] == TXNS && done[2] == TXNS && done[3] == TXNS);
    repeat (3) @(posedge clk);
    for (int i = 0; i < N; i++) check(done[i] == TXNS, $sformatf("master %0d completed", i));
    check(n_contended > 0, "contended lottery");
    check(n_cap > 0, "burst cut at the limit");
    check(n_early > 0, "early release");
    check(n_reads > 0 && n_writes > 0, "reads and writes");
    check(n_tkt_change == 2, "ticket changes");
    check(n_zero_excl > 0, "zero-ticket requester excluded");
    $display("INFO contended=%0d cap=%0d early=%0d reads=%0d writes=%0d zero_excl=%0d",
             n_contended, n_cap, n_early, n_reads, n_writes, n_zero_excl);
    for (int i = 0; i < N; i++)
      $display("INFO master %0d: %0d grants, mean wait %0d.%02d cycles", i, grants[i],
               wait_sum[i] / (grants[i] ? grants[i] : 1), (wait_sum[i] * 100 / (grants[i] ? grants[i] : 1)) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
