// shared_mem: the shared on-chip memory slave on the bus.
//
// DEPTH words of DATA_W bits (eight bytes, mem0..mem7, by default). A write
// (`en` and `we` high) stores `wdata` at the clock edge; a read returns the
// addressed word combinationally on `rdata` in the same cycle, so one bus
// cycle completes one transfer. Only the low log2(DEPTH) address bits are
// decoded; higher bits alias. Reset clears every word. The document shows the
// memory's signals and contents but not its timing; single-cycle access,
// aliasing and reset clearing are this design's choices.
module shared_mem #(
  parameter int unsigned DATA_W = soc_pkg::DATA_W,
  parameter int unsigned ADDR_W = soc_pkg::ADDR_W,
  parameter int unsigned DEPTH  = soc_pkg::MEM_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [IW-1:0]     idx;

  assign idx   = addr[IW-1:0];
  assign rdata = mem[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (en && we) begin
      mem[idx] <= wdata;
    end
  end

endmodule
