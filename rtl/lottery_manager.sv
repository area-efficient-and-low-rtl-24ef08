// lottery_manager: dynamic lottery bus arbiter.
//
// Decides, each time the shared bus becomes free, which of the N requesting
// masters owns it next. The chance of master i winning is r_i*t_i / sum_j r_j*t_j:
// proportional to the tickets it holds, among the masters that request.
// Datapath, as in the document: the ticket store (ticket_gen) feeds a request
// mask (ticket_mask, r_i AND t_i), an adder network forms the partial sums s_i
// and the total T (partial_sum), an LFSR number is folded into [0, T)
// (lfsr_rng, rand_range) and parallel comparators with a first-hit priority
// chain pick the winner (compare_grant).
//
// Grant protocol (this design's choice; the document only says the winner gets
// the bus "for a specific number of bus cycles"): `gnt` is registered and
// one-hot. The owner keeps the bus for as long as it holds `req` high, up to
// MAX_BURST cycles; every cycle in which gnt[i] and req[i] are both high is one
// bus transfer of master i. A new lottery is drawn in the cycle in which the
// bus is free (no owner, owner dropped req, or owner in its last allowed
// cycle), and its winner is granted at the next clock edge. A master that
// raises req while the bus is idle therefore sees gnt one cycle later. When the
// limit is reached and the owner still requests, it takes part in the next
// lottery like everyone else. The LFSR advances every cycle.
// Outputs `draw` (the folded random number) and `total` show the last lottery.
module lottery_manager #(
  parameter int unsigned N         = soc_pkg::N_MASTERS,
  parameter int unsigned TW        = soc_pkg::TICKET_W,
  parameter int unsigned RW        = soc_pkg::LFSR_W,
  parameter int unsigned MAX_BURST = soc_pkg::MAX_BURST,
  parameter logic [TW-1:0] INIT_TICKETS [N] = '{4'd1, 4'd2, 4'd3, 4'd4},
  localparam int unsigned SW = soc_pkg::sum_width(TW, N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  // run-time ticket update
  input  logic                 tkt_wr_en,
  input  logic [$clog2(N)-1:0] tkt_wr_idx,
  input  logic [TW-1:0]        tkt_wr_val,
  output logic [TW-1:0]        tickets [N],
  // grant and observation
  output logic [N-1:0]         gnt,
  output logic                 bus_free,
  output logic [SW-1:0]        draw,
  output logic [SW-1:0]        total
);

  localparam int unsigned CW = (MAX_BURST > 1) ? $clog2(MAX_BURST) : 1;

  logic [TW-1:0] masked [N];
  logic [SW-1:0] psum   [N];
  logic [RW-1:0] raw;
  logic          draw_valid;
  logic [N-1:0]  hit, win;
  logic [CW-1:0] burst_cnt;
  logic          owner_active;

  ticket_gen #(.N(N), .TW(TW), .INIT_TICKETS(INIT_TICKETS)) u_tickets (
    .clk, .rst_n, .wr_en(tkt_wr_en), .wr_idx(tkt_wr_idx),
    .wr_tickets(tkt_wr_val), .tickets
  );

  ticket_mask #(.N(N), .TW(TW)) u_mask (.req, .tickets, .masked);

  partial_sum #(.N(N), .TW(TW), .SW(SW)) u_psum (.masked, .psum, .total);

  lfsr_rng #(.W(RW)) u_rng (.clk, .rst_n, .en(1'b1), .rnd(raw));

  rand_range #(.RW(RW), .SW(SW)) u_range (
    .raw, .total, .rnd(draw), .valid(draw_valid)
  );

  compare_grant #(.N(N), .SW(SW)) u_cmp (
    .rnd(draw), .valid(draw_valid), .psum, .hit, .win
  );

  assign owner_active = |(gnt & req);
  assign bus_free     = !owner_active || (burst_cnt == CW'(MAX_BURST - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt       <= '0;
      burst_cnt <= '0;
    end else if (bus_free) begin
      gnt       <= win;
      burst_cnt <= '0;
    end else begin
      burst_cnt <= burst_cnt + 1'b1;
    end
  end

  // At most one master owns the bus.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  // The winner is always one of the firing comparators.
  a_win: assert property (@(posedge clk) disable iff (!rst_n) (win & ~hit) == '0);
  // A fresh grant goes only to a master that was requesting when it was drawn.
  a_req: assert property (@(posedge clk) disable iff (!rst_n)
                          bus_free |=> ((gnt & ~$past(req)) == '0));

endmodule
