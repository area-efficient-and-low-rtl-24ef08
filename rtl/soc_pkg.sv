// soc_pkg: types and constants shared by the lottery-arbitrated shared-bus SoC.
//
// The system has four bus masters (as in the document's examples), an 8-bit
// data path and an 8-bit address (as printed in the simulation screenshot), and
// a 4-bit ticket count per master (this design's choice; the document gives no
// ticket width). The derived width of a partial sum of tickets is computed here
// so that every block agrees on it.
package soc_pkg;

  localparam int unsigned N_MASTERS = 4;   // masters C1..C4 / M0..M3
  localparam int unsigned TICKET_W  = 4;   // tickets per master: 0..15
  localparam int unsigned DATA_W    = 8;   // shared data bus width
  localparam int unsigned ADDR_W    = 8;   // shared address bus width
  localparam int unsigned MEM_DEPTH = 8;   // words in the shared memory (mem0..mem7)
  localparam int unsigned LFSR_W    = 8;   // random number generator width
  localparam int unsigned MAX_BURST = 4;   // bus cycles a winner may keep the bus

  // Width needed for the sum of n values of w bits each.
  function automatic int unsigned sum_width(int unsigned w, int unsigned n);
    return w + $clog2(n + 1);
  endfunction

  // One master's request onto the shared bus.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
    logic              we;
  } bus_cmd_t;

endpackage
