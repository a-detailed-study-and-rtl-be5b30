// lvt_table: live value table, the bookkeeping part of the LVT memory.
//
// For every address of the memory it holds the number of the write port (and so
// of the bank) that wrote that address last. It has NW write ports and NR read
// ports and is built from flip-flops, which is feasible because an entry is only
// $clog2(NW) bits wide. When we[w] is high, entry waddr[w] is set to w on the
// rising edge; if several ports write one address in the same cycle the
// highest-numbered port is recorded. Read port r registers entry raddr[r] on the
// rising edge, so rsel[r] is valid one cycle later, aligned with the block RAM
// reads of the banks; a same-cycle write is not yet visible (read-first).
// Entries start at 0. The table's role is the document's; the flip-flop build,
// the tie-break and the timing are choices of this design.
module lvt_table #(
  parameter int unsigned DEPTH = mpmem_pkg::MEM_DEPTH,
  parameter int unsigned NW    = mpmem_pkg::MEM_PORTS,
  parameter int unsigned NR    = mpmem_pkg::MEM_PORTS,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned SW = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic                  clk,
  input  logic [NW-1:0]         we,
  input  logic [NW-1:0][AW-1:0] waddr,
  input  logic [NR-1:0][AW-1:0] raddr,
  output logic [NR-1:0][SW-1:0] rsel
);
  logic [SW-1:0] tbl [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) tbl[i] = '0;
  end

  // Later loop iterations override earlier ones: the highest write port wins.
  always_ff @(posedge clk) begin
    for (int w = 0; w < NW; w++)
      if (we[w]) tbl[waddr[w]] <= SW'(w);
    for (int r = 0; r < NR; r++)
      rsel[r] <= tbl[raddr[r]];
  end
endmodule
