// lfsr_rng: pseudo-random number generator for the lottery draw.
//
// A Fibonacci linear-feedback shift register, the "pseudo random binary
// sequence generator" the lottery manager draws its numbers from. Every cycle
// with `en` high the register shifts left by one and the new bit 0 is the XOR
// of the tap bits selected by TAPS. The default taps (bits 7, 5, 4, 3, i.e. the
// polynomial x^8 + x^6 + x^5 + x^4 + 1) give the maximal period of 255 for an
// 8-bit register. The register resets to SEED; should it ever hold all zeros
// (the LFSR's lock-up state) it reloads SEED on the next enabled cycle.
// Interface: `rnd` is the register itself, valid in the cycle after reset.
// The document only says the generator is a pseudo-random binary sequence
// generator; width, polynomial and seed are this design's choices.
module lfsr_rng #(
  parameter int unsigned    W    = soc_pkg::LFSR_W,
  parameter logic [W-1:0]   TAPS = 8'hB8,
  parameter logic [W-1:0]   SEED = 8'h5A
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] rnd
);

  logic fb;
  assign fb = ^(rnd & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           rnd <= SEED;
    else if (en) begin
      if (rnd == '0)      rnd <= SEED;
      else                rnd <= {rnd[W-2:0], fb};
    end
  end

endmodule
