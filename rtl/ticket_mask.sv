// ticket_mask: gates every master's tickets with its request line.
//
// Produces r_i * t_i for each master i: the master's ticket count when it is
// requesting the bus, zero when it is not. The document describes this as a
// bitwise AND of the request bit with the ticket bits; that is exactly what
// is built here. Purely combinational.
module ticket_mask #(
  parameter int unsigned N  = soc_pkg::N_MASTERS,
  parameter int unsigned TW = soc_pkg::TICKET_W
) (
  input  logic [N-1:0]  req,
  input  logic [TW-1:0] tickets [N],
  output logic [TW-1:0] masked  [N]
);

  always_comb begin
    for (int i = 0; i < N; i++) masked[i] = tickets[i] & {TW{req[i]}};
  end

endmodule
