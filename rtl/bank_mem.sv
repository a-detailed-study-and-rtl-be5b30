// bank_mem: banked memory, DEPTH words split evenly over NB independent banks.
//
// The DEPTH x WIDTH storage is divided into NB banks of DEPTH/NB words (32 x 8
// into four 8 x 8 banks by default). Port k has one write port and one read port
// on bank k only, addressed with a bank-local address of $clog2(DEPTH/NB) bits;
// no port can reach another port's bank, so the banks act as NB separate
// memories sharing a clock. Reads are synchronous (one cycle), read-first on a
// same-address write. The split and the private ports are the document's; the
// bank-local addressing and the timing are choices of this design.
module bank_mem #(
  parameter int unsigned DEPTH = mpmem_pkg::MEM_DEPTH,
  parameter int unsigned WIDTH = mpmem_pkg::MEM_WIDTH,
  parameter int unsigned NB    = mpmem_pkg::MEM_PORTS,
  localparam int unsigned BDEPTH = DEPTH / NB,
  localparam int unsigned BAW    = (BDEPTH > 1) ? $clog2(BDEPTH) : 1
) (
  input  logic                     clk,
  input  logic [NB-1:0]            we,
  input  logic [NB-1:0][BAW-1:0]   waddr,
  input  logic [NB-1:0][WIDTH-1:0] wdata,
  input  logic [NB-1:0][BAW-1:0]   raddr,
  output logic [NB-1:0][WIDTH-1:0] rdata
);
  initial assert (DEPTH % NB == 0) else $error("bank_mem: DEPTH must be a multiple of NB");

  for (genvar b = 0; b < NB; b++) begin : g_bank
    bram_sdp #(.DEPTH(BDEPTH), .WIDTH(WIDTH), .WRITE_FIRST(1'b0)) u_bram (
      .clk  (clk),
      .we   (we[b]),
      .waddr(waddr[b]),
      .wdata(wdata[b]),
      .raddr(raddr[b]),
      .rdata(rdata[b])
    );
  end
endmodule
