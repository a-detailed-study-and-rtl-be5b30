// bram_sdp: simple dual-port block RAM, the building block of every organisation.
//
// One write port and one read port on a single clock. The array is written on
// the rising edge when `we` is high; the read address is sampled on the same
// edge and the word appears on `rdata` one cycle later (registered output, as in
// an FPGA block RAM). On a read and a write to the same address in one cycle the
// read returns the old word (WRITE_FIRST = 0, read-first) or the word being
// written (WRITE_FIRST = 1, write-first). Contents start at zero, as block RAM
// does after configuration. The two-port limit is the FPGA's; the collision modes
// and the zero start are choices of this design.
module bram_sdp #(
  parameter int unsigned DEPTH       = mpmem_pkg::MEM_DEPTH,
  parameter int unsigned WIDTH       = mpmem_pkg::MEM_WIDTH,
  parameter bit          WRITE_FIRST = 1'b0,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (WRITE_FIRST && we && (waddr == raddr)) rdata <= wdata;
    else                                       rdata <= mem[raddr];
  end
endmodule
