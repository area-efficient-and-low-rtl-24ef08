// rand_range: folds the raw random number into the ticket range [0, T).
//
// The lottery draw must lie inside the range spanned by the tickets of the
// masters that are requesting, whose size T changes every cycle. This block
// takes the LFSR output modulo T. As the document points out for the dynamic
// lottery manager, the result is not exactly uniform, because 2^W - 1 is in
// general not a multiple of T. When T is zero (no requesting master holds a
// ticket) the output is zero and `valid` is low, so no grant is made.
// Combinational.
module rand_range #(
  parameter int unsigned RW = soc_pkg::LFSR_W,
  parameter int unsigned SW = soc_pkg::sum_width(soc_pkg::TICKET_W, soc_pkg::N_MASTERS)
) (
  input  logic [RW-1:0] raw,
  input  logic [SW-1:0] total,
  output logic [SW-1:0] rnd,
  output logic          valid
);

  localparam int unsigned MW = (RW > SW) ? RW : SW;

  // the remainder is below `total`, so it always fits in SW bits
  always_comb begin
    valid = (total != '0);
    rnd   = '0;
    if (valid) rnd = SW'(MW'(raw) % MW'(total));
  end

endmodule
