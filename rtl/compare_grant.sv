// compare_grant: comparison and grant generation of the lottery manager.
//
// The random number is compared in parallel with all N partial sums; the
// comparator of master i fires when rnd < s_i. Several comparators can fire
// for the same number, so a priority chain keeps only the first one, starting
// from master 0. Because the sub-range of master i is [s_{i-1}, s_i), the
// first firing comparator is the master whose sub-range holds the number, and
// a master with no tickets (or no request) owns an empty sub-range and can
// never win. `win` is one-hot, or all zeros when `valid` is low.
// Combinational; follows the document's description of this stage. The
// document also gives a 1-based example (random number 1 with a one-ticket
// first master wins master 1); a 0-based number compared with "less than", as
// here, selects the same masters for the same draws.
module compare_grant #(
  parameter int unsigned N  = soc_pkg::N_MASTERS,
  parameter int unsigned SW = soc_pkg::sum_width(soc_pkg::TICKET_W, soc_pkg::N_MASTERS)
) (
  input  logic [SW-1:0] rnd,
  input  logic          valid,
  input  logic [SW-1:0] psum [N],
  output logic [N-1:0]  hit,
  output logic [N-1:0]  win
);

  always_comb begin
    logic taken;   // a lower-numbered comparator has already fired
    taken = 1'b0;
    for (int i = 0; i < N; i++) begin
      hit[i] = valid && (rnd < psum[i]);
      win[i] = hit[i] && !taken;
      taken  = taken | hit[i];
    end
  end

endmodule
