// lottery_soc_maps_tb: the request-map workloads, run on the SoC at its
// default size. For each of the maps 1011, 0111, 1110 and 1101 (written
// C1 C2 C3 C4, a 1 meaning that master contends) the contending masters keep
// the bus saturated: each always has words to move, alternating a write of its
// own memory word with a read of it. With tickets 1, 2, 3, 4 the testbench
// checks, per map:
//   - the bus carries a transfer in every cycle (saturated bus, no lost cycles),
//   - each burst lasts exactly MAX_BURST words,
//   - a master outside the map is never granted,
//   - each contending master's share of the lotteries is within 25% of its
//     ticket share (map 1011 is the document's 1:3:4 example),
//   - every read returns the value last written.
// It prints, per master, the share of bus words (bandwidth) and the mean and
// worst wait between two of its bursts.
module lottery_soc_maps_tb;
  import soc_pkg::*;
  localparam int N = N_MASTERS, CYCLES = 8000;
  localparam logic [N-1:0] MAPS [4] = '{4'b1101, 4'b1110, 4'b0111, 4'b1011};
  localparam string NAMES [4] = '{"1011", "0111", "1110", "1101"};

  logic clk = 0, rst_n = 0;
  logic [N-1:0] m_req = '0;
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

  logic [DATA_W-1:0] model [MEM_DEPTH];
  int words [N], bursts [N], wait_sum [N], wait_max [N], last_end [N];
  int busy, burst_len, owner, bad_len;
  logic [N-1:0] map;
  bit measuring = 0, new_grant = 0;
  int cyc = 0;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // masters with an endless backlog: write own word, then read it back
  always @(posedge clk) begin
    for (int i = 0; i < N; i++)
      if (m_gnt[i] && m_req[i]) begin
        bus_cmd_t c;
        c = m_cmd[i];
        c.we = !c.we;
        c.addr = ADDR_W'(2 * i);
        c.wdata = c.wdata + 8'd1;
        m_cmd[i] <= c;
      end
  end

  // observer
  always @(posedge clk) begin
    if (rst_n) begin
      logic [N-1:0] xfer;
      cyc++;
      xfer = m_gnt & m_req;
      if (xfer != 0) begin
        int i;
        bus_cmd_t c;
        i = $clog2(xfer);
        c = m_cmd[i];
        if (c.we) model[c.addr[2:0]] = c.wdata;
        else check(bus_rdata == model[c.addr[2:0]], "read-back value");
        if (measuring) begin
          busy++;
          words[i]++;
          if (owner != i || new_grant) begin
            if (owner >= 0 && burst_len != MAX_BURST) bad_len++;
            if (owner >= 0) last_end[owner] = cyc - 1;
            bursts[i]++;
            if (last_end[i] >= 0) begin
              wait_sum[i] += cyc - last_end[i] - 1;
              if (cyc - last_end[i] - 1 > wait_max[i]) wait_max[i] = cyc - last_end[i] - 1;
            end
            burst_len = 1;
          end else burst_len++;
          owner = i;
        end
      end
      if (measuring) check((m_gnt & ~map) == 0, "master outside the map granted");
      new_grant = bus_free;
    end
  end

  initial begin
    for (int i = 0; i < MEM_DEPTH; i++) model[i] = 0;
    for (int i = 0; i < N; i++) m_cmd[i] = '{addr: ADDR_W'(2 * i), wdata: 8'(16 * i), we: 1'b1};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int m = 0; m < 4; m++) begin
      int tot_bursts, tot_tkt;
      map = MAPS[m];
      for (int i = 0; i < N; i++) begin
        words[i] = 0; bursts[i] = 0; wait_sum[i] = 0; wait_max[i] = 0; last_end[i] = -1;
      end
      busy = 0; owner = -1; burst_len = 0; bad_len = 0;
      @(negedge clk) m_req = map;
      // start measuring at a burst boundary
      do @(posedge clk); while (!(bus_free && (m_gnt & map) != 0));
      @(negedge clk) measuring = 1;
      repeat (CYCLES) @(posedge clk);
      @(negedge clk) begin measuring = 0; m_req = '0; end
      repeat (3) @(posedge clk);
      check(busy == CYCLES, $sformatf("map %s: bus busy %0d of %0d cycles", NAMES[m], busy, CYCLES));
      check(bad_len == 0, $sformatf("map %s: %0d bursts not of %0d words", NAMES[m], bad_len, MAX_BURST));
      tot_bursts = 0; tot_tkt = 0;
      for (int i = 0; i < N; i++) begin
        tot_bursts += bursts[i];
        if (map[i]) tot_tkt += tickets[i];
      end
      $display("INFO map %s (C1..C4), tickets 1:2:3:4, %0d lotteries", NAMES[m], tot_bursts);
      for (int i = 0; i < N; i++) begin
        if (!map[i]) begin
          check(words[i] == 0, $sformatf("map %s: idle master C%0d used the bus", NAMES[m], i + 1));
          continue;
        end
        // share of lotteries against share of tickets, 25% tolerance
        check(bursts[i] * tot_tkt * 4 > tot_bursts * tickets[i] * 3 &&
              bursts[i] * tot_tkt * 4 < tot_bursts * tickets[i] * 5,
              $sformatf("map %s: C%0d won %0d of %0d, tickets %0d of %0d",
                        NAMES[m], i + 1, bursts[i], tot_bursts, tickets[i], tot_tkt));
        $display("INFO   C%0d: bandwidth %0d.%01d%% of cycles, wait between bursts mean %0d cycles, worst %0d",
                 i + 1, words[i] * 100 / CYCLES, (words[i] * 1000 / CYCLES) % 10,
                 wait_sum[i] / (bursts[i] > 1 ? bursts[i] - 1 : 1), wait_max[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
