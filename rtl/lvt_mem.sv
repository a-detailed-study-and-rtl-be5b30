// lvt_mem: multi-ported memory with a live value table (LVT), NW writes and NR reads.
//
// Each write port k owns bank k, a replicated memory with one write port and NR
// read ports (one block RAM copy per read port), so every bank can serve all read
// ports at once. A write goes only to its own bank and, at the same time, the
// live value table records that bank k now holds the newest value of that
// address. Read port r reads address raddr[r] in every bank and in the table;
// one cycle later the table's answer drives the select of an NW-to-1 multiplexer
// that passes the word of the live bank to rdata[r]. All ports work in every
// cycle. A write is seen by reads issued from the next cycle on; a read in the
// same cycle returns the previous value. When several ports write one address in
// one cycle, the highest-numbered port's data is kept. The structure (banks,
// table, output multiplexers) is the document's; the timing and the tie-break are
// choices of this design.
module lvt_mem #(
  parameter int unsigned DEPTH = mpmem_pkg::MEM_DEPTH,
  parameter int unsigned WIDTH = mpmem_pkg::MEM_WIDTH,
  parameter int unsigned NW    = mpmem_pkg::MEM_PORTS,
  parameter int unsigned NR    = mpmem_pkg::MEM_PORTS,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned SW = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic                     clk,
  input  logic [NW-1:0]            we,
  input  logic [NW-1:0][AW-1:0]    waddr,
  input  logic [NW-1:0][WIDTH-1:0] wdata,
  input  logic [NR-1:0][AW-1:0]    raddr,
  output logic [NR-1:0][WIDTH-1:0] rdata
);
  logic [NW-1:0][NR-1:0][WIDTH-1:0] bank_rdata;  // [bank][read port]
  logic [NR-1:0][SW-1:0]            rsel;

  for (genvar w = 0; w < NW; w++) begin : g_bank
    rep_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NR(NR)) u_bank (
      .clk  (clk),
      .we   (we[w]),
      .waddr(waddr[w]),
      .wdata(wdata[w]),
      .raddr(raddr),
      .rdata(bank_rdata[w])
    );
  end

  lvt_table #(.DEPTH(DEPTH), .NW(NW), .NR(NR)) u_lvt (
    .clk  (clk),
    .we   (we),
    .waddr(waddr),
    .raddr(raddr),
    .rsel (rsel)
  );

  always_comb begin
    for (int r = 0; r < NR; r++) rdata[r] = bank_rdata[rsel[r]][r];
  end
endmodule
