// bus_mux: the shared-bus multiplexer.
//
// Drives the shared bus with the command (address, write data, write enable)
// of the master that holds the grant. It is an AND-OR multiplexer: each
// master's command is gated by its grant-and-request bit and the results are
// ORed, so with a one-hot grant exactly the owner's command reaches the bus.
// `bus_valid` is high in every cycle in which the owner is requesting, i.e. in
// every cycle that carries a transfer. Combinational. The document only names
// a mux in the processor top; this structure is this design's choice.
module bus_mux #(
  parameter int unsigned N = soc_pkg::N_MASTERS
) (
  input  logic [N-1:0]      gnt,
  input  logic [N-1:0]      req,
  input  soc_pkg::bus_cmd_t m_cmd [N],
  output soc_pkg::bus_cmd_t bus_cmd,
  output logic              bus_valid
);

  logic [N-1:0] sel;

  always_comb begin
    sel     = gnt & req;
    bus_cmd = '0;
    for (int i = 0; i < N; i++) if (sel[i]) bus_cmd = bus_cmd | m_cmd[i];
    bus_valid = |sel;
  end

endmodule
