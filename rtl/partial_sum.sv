// partial_sum: running sums of the masked tickets.
//
// For masters 0..N-1 it forms s_i = r_0*t_0 + ... + r_i*t_i and the total
// T = s_{N-1}. Master i owns the sub-range [s_{i-1}, s_i) of [0, T): the
// comparison stage finds which sub-range the random number falls in. The
// document calls for an adder tree; with four masters the prefix sums are
// built as a chain of three adders (each s_i reuses s_{i-1}), which is the
// smallest adder network that yields every partial sum. Combinational.
module partial_sum #(
  parameter int unsigned N  = soc_pkg::N_MASTERS,
  parameter int unsigned TW = soc_pkg::TICKET_W,
  parameter int unsigned SW = soc_pkg::sum_width(TW, N)
) (
  input  logic [TW-1:0] masked [N],
  output logic [SW-1:0] psum   [N],
  output logic [SW-1:0] total
);

  always_comb begin
    psum[0] = SW'(masked[0]);
    for (int i = 1; i < N; i++) psum[i] = psum[i-1] + SW'(masked[i]);
  end

  assign total = psum[N-1];

endmodule
