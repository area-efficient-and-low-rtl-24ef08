// lottery_soc: four bus masters sharing one bus to an on-chip memory, with a
// dynamic lottery arbiter deciding bus ownership.
//
// The masters themselves are outside this module: each brings its request
// `m_req[i]` and its bus command `m_cmd[i]` (address, write data, write enable)
// and receives its grant `m_gnt[i]` and the shared read data `bus_rdata`.
// Inside, the lottery manager grants the bus, the bus multiplexer puts the
// owner's command on the shared bus and the shared memory serves it.
// Timing: a master raises m_req and holds its command steady; in every cycle in
// which both m_req[i] and m_gnt[i] are high one word is transferred (a write
// lands at the clock edge, read data is valid in the same cycle). The grant
// arrives one cycle after the request when the bus is idle and lasts at most
// MAX_BURST cycles. Ticket counts can be changed at any time through the
// `tkt_*` port. `bus_*`, `lottery_*` and `tickets` outputs expose the shared
// bus, the last lottery and the current ticket counts for observation;
// `bus_free` is high in a cycle whose lottery winner takes the bus next.
// The structure (lottery manager, multiplexer, memory on one shared bus)
// follows the document; the single-cycle bus protocol is this design's.
module lottery_soc #(
  parameter int unsigned N         = soc_pkg::N_MASTERS,
  parameter int unsigned MAX_BURST = soc_pkg::MAX_BURST,
  parameter int unsigned DEPTH     = soc_pkg::MEM_DEPTH,
  localparam int unsigned TW = soc_pkg::TICKET_W,
  localparam int unsigned SW = soc_pkg::sum_width(TW, N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // masters
  input  logic [N-1:0]             m_req,
  input  soc_pkg::bus_cmd_t        m_cmd [N],
  output logic [N-1:0]             m_gnt,
  output logic [soc_pkg::DATA_W-1:0] bus_rdata,
  // ticket programming
  input  logic                     tkt_wr_en,
  input  logic [$clog2(N)-1:0]     tkt_wr_idx,
  input  logic [TW-1:0]            tkt_wr_val,
  // observation
  output soc_pkg::bus_cmd_t        bus_cmd,
  output logic                     bus_valid,
  output logic                     bus_free,
  output logic [SW-1:0]            lottery_draw,
  output logic [SW-1:0]            lottery_total,
  output logic [TW-1:0]            tickets [N]
);

  lottery_manager #(.N(N), .MAX_BURST(MAX_BURST)) u_arbiter (
    .clk, .rst_n, .req(m_req),
    .tkt_wr_en, .tkt_wr_idx, .tkt_wr_val, .tickets,
    .gnt(m_gnt), .bus_free, .draw(lottery_draw), .total(lottery_total)
  );

  bus_mux #(.N(N)) u_mux (
    .gnt(m_gnt), .req(m_req), .m_cmd, .bus_cmd, .bus_valid
  );

  shared_mem #(.DEPTH(DEPTH)) u_mem (
    .clk, .rst_n, .en(bus_valid), .we(bus_cmd.we), .addr(bus_cmd.addr),
    .wdata(bus_cmd.wdata), .rdata(bus_rdata)
  );

endmodule
