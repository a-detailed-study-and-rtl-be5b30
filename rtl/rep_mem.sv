// rep_mem: replicated memory, one write port and NR read ports.
//
// Each read port gets its own full copy of the DEPTH x WIDTH memory in a simple
// dual-port block RAM; the single write port is wired to the write side of every
// copy, so all copies always hold the same contents. Each read port can thus read
// any address independently, at the cost of NR times the storage. Only one write
// port is possible. Reads are synchronous: rdata[i] is valid one cycle after
// raddr[i]; a read of the address being written in the same cycle returns the
// old word. The structure is the document's; the timing is that of the block RAM
// model chosen here.
module rep_mem #(
  parameter int unsigned DEPTH = mpmem_pkg::MEM_DEPTH,
  parameter int unsigned WIDTH = mpmem_pkg::MEM_WIDTH,
  parameter int unsigned NR    = mpmem_pkg::MEM_PORTS,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [NR-1:0][AW-1:0]    raddr,
  output logic [NR-1:0][WIDTH-1:0] rdata
);
  for (genvar r = 0; r < NR; r++) begin : g_copy
    bram_sdp #(.DEPTH(DEPTH), .WIDTH(WIDTH), .WRITE_FIRST(1'b0)) u_bram (
      .clk  (clk),
      .we   (we),
      .waddr(waddr),
      .wdata(wdata),
      .raddr(raddr[r]),
      .rdata(rdata[r])
    );
  end
endmodule
