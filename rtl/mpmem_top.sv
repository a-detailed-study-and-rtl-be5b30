// mpmem_top: the five multi-ported memory organisations side by side.
//
// Replication (1 write, NP reads), banking (NP private write/read port pairs),
// multipumping (NP writes and NP reads on one memory at NP internal cycles per
// external cycle), the live value table memory (NP writes, NP reads) and the XOR
// memory (XNW writes, XNR reads) all hold DEPTH x WIDTH words. They share only
// the clock and rst, which clears the multipumped memory's phase counter and
// the XOR memory's pending write. Each memory's
// ports are brought out under its own prefix (rep_, bank_, mp_, lvt_, xor_) with
// the timing described in that memory's module. Placing all five in one top is a
// choice of this design, made so that they can be built and compared together.
module mpmem_top #(
  parameter int unsigned DEPTH = mpmem_pkg::MEM_DEPTH,
  parameter int unsigned WIDTH = mpmem_pkg::MEM_WIDTH,
  parameter int unsigned NP    = mpmem_pkg::MEM_PORTS,
  parameter int unsigned XNW   = mpmem_pkg::XOR_NW,
  parameter int unsigned XNR   = mpmem_pkg::XOR_NR,
  localparam int unsigned AW  = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned BAW = (DEPTH / NP > 1) ? $clog2(DEPTH / NP) : 1
) (
  input  logic                      clk,
  input  logic                      rst,
  // Replication
  input  logic                      rep_we,
  input  logic [AW-1:0]             rep_waddr,
  input  logic [WIDTH-1:0]          rep_wdata,
  input  logic [NP-1:0][AW-1:0]     rep_raddr,
  output logic [NP-1:0][WIDTH-1:0]  rep_rdata,
  // Banking
  input  logic [NP-1:0]             bank_we,
  input  logic [NP-1:0][BAW-1:0]    bank_waddr,
  input  logic [NP-1:0][WIDTH-1:0]  bank_wdata,
  input  logic [NP-1:0][BAW-1:0]    bank_raddr,
  output logic [NP-1:0][WIDTH-1:0]  bank_rdata,
  // Multipumping
  output logic                      mp_accept,
  input  logic [NP-1:0]             mp_we,
  input  logic [NP-1:0][AW-1:0]     mp_waddr,
  input  logic [NP-1:0][WIDTH-1:0]  mp_wdata,
  input  logic [NP-1:0][AW-1:0]     mp_raddr,
  output logic [NP-1:0][WIDTH-1:0]  mp_rdata,
  output logic                      mp_rvalid,
  // Live value table
  input  logic [NP-1:0]             lvt_we,
  input  logic [NP-1:0][AW-1:0]     lvt_waddr,
  input  logic [NP-1:0][WIDTH-1:0]  lvt_wdata,
  input  logic [NP-1:0][AW-1:0]     lvt_raddr,
  output logic [NP-1:0][WIDTH-1:0]  lvt_rdata,
  // XOR
  input  logic [XNW-1:0]            xor_we,
  input  logic [XNW-1:0][AW-1:0]    xor_waddr,
  input  logic [XNW-1:0][WIDTH-1:0] xor_wdata,
  input  logic [XNR-1:0][AW-1:0]    xor_raddr,
  output logic [XNR-1:0][WIDTH-1:0] xor_rdata
);
  rep_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NR(NP)) u_rep (
    .clk(clk), .we(rep_we), .waddr(rep_waddr), .wdata(rep_wdata),
    .raddr(rep_raddr), .rdata(rep_rdata)
  );

  bank_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NB(NP)) u_bank (
    .clk(clk), .we(bank_we), .waddr(bank_waddr), .wdata(bank_wdata),
    .raddr(bank_raddr), .rdata(bank_rdata)
  );

  mpump_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NP(NP)) u_mp (
    .clk(clk), .rst(rst), .accept(mp_accept),
    .we(mp_we), .waddr(mp_waddr), .wdata(mp_wdata),
    .raddr(mp_raddr), .rdata(mp_rdata), .rvalid(mp_rvalid)
  );

  lvt_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NW(NP), .NR(NP)) u_lvt (
    .clk(clk), .we(lvt_we), .waddr(lvt_waddr), .wdata(lvt_wdata),
    .raddr(lvt_raddr), .rdata(lvt_rdata)
  );

  xor_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NW(XNW), .NR(XNR)) u_xor (
    .clk(clk), .rst(rst), .we(xor_we), .waddr(xor_waddr), .wdata(xor_wdata),
    .raddr(xor_raddr), .rdata(xor_rdata)
  );
endmodule
