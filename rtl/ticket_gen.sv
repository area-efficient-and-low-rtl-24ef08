// ticket_gen: the ticket store of the dynamic lottery manager.
//
// Holds the number of lottery tickets each master currently owns. In the
// dynamic lottery bus the ticket counts are not fixed at design time: they can
// be rewritten while the system runs, through a simple write port (`wr_en`,
// `wr_idx`, `wr_tickets`), taking effect from the next clock edge. Reset loads
// INIT_TICKETS. The outputs `tickets[i]` are the registered counts and feed
// the request mask of the lottery manager directly.
// The document names a "ticket generator" that supplies the current tickets
// but does not say how they are produced; the run-time write port and the
// reset values 1, 2, 3, 4 (which reproduce the document's 1:3:4 example for
// masters 1, 3 and 4) are this design's choices.
module ticket_gen #(
  parameter int unsigned N  = soc_pkg::N_MASTERS,
  parameter int unsigned TW = soc_pkg::TICKET_W,
  parameter logic [TW-1:0] INIT_TICKETS [N] = '{4'd1, 4'd2, 4'd3, 4'd4}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_idx,
  input  logic [TW-1:0]        wr_tickets,
  output logic [TW-1:0]        tickets [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) tickets[i] <= INIT_TICKETS[i];
    end else if (wr_en) begin
      tickets[wr_idx] <= wr_tickets;
    end
  end

endmodule
