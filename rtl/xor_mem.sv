// xor_mem: XOR-based multi-ported memory, NW write ports and NR read ports.
//
// Write port k owns bank k. Instead of a live value table, bank k stores at each
// address the port's data XORed with the words the other banks hold there, so
// that the XOR of all banks at an address is the last word written to it:
// writing d through port k stores d ^ (XOR of banks j != k), and a read computes
// bank0 ^ bank1 ^ ... which cancels every term but d. Each bank is a set of
// identical block RAM copies sharing one write port: one copy per other write
// port (read at that port's write address) and one copy per read port (read at
// the read address). With the default 2W/1R this is banks A and A' for port 0
// and B and B' for port 1.
//
// Timing: a write request is taken on the rising edge; the other banks are read
// at its address, and on the next edge the XORed word is written to the port's
// bank. The copies are write-first, so a word written on an edge is seen by every
// read sampled on that edge; this lets back-to-back writes to one address and
// reads issued in the cycle after a write request return the new value. A read
// issued in the same cycle as the write request returns the previous value.
// rdata is valid one cycle after raddr. rst (synchronous) cancels a pending
// write and blocks bank writes while it is high; the banks themselves start at zero. If several ports write one address in
// the same cycle, only the highest-numbered port's write is performed. The XOR
// encoding, the bank copies and the read XOR are the document's; the two-cycle
// write, write-first copies and the tie-break are choices of this design.
module xor_mem #(
  parameter int unsigned DEPTH = mpmem_pkg::MEM_DEPTH,
  parameter int unsigned WIDTH = mpmem_pkg::MEM_WIDTH,
  parameter int unsigned NW    = mpmem_pkg::XOR_NW,
  parameter int unsigned NR    = mpmem_pkg::XOR_NR,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned NC = (NW - 1) + NR  // copies per bank
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [NW-1:0]            we,
  input  logic [NW-1:0][AW-1:0]    waddr,
  input  logic [NW-1:0][WIDTH-1:0] wdata,
  input  logic [NR-1:0][AW-1:0]    raddr,
  output logic [NR-1:0][WIDTH-1:0] rdata
);
  // Stage 0: drop a write that a higher-numbered port overrides in the same cycle.
  logic [NW-1:0]            we_eff;
  // Stage 1: the request taken on the last edge, and the word to store.
  logic [NW-1:0]            we_q;
  logic [NW-1:0][AW-1:0]    waddr_q;
  logic [NW-1:0][WIDTH-1:0] wdata_q;
  logic [NW-1:0][WIDTH-1:0] wenc;
  // Copy outputs: [bank][copy].
  logic [NW-1:0][NC-1:0][WIDTH-1:0] cp_rdata;
  logic [NW-1:0][NC-1:0][AW-1:0]    cp_raddr;

  always_comb begin
    for (int k = 0; k < NW; k++) begin
      we_eff[k] = we[k];
      for (int j = k + 1; j < NW; j++)
        if (we[j] && (waddr[j] == waddr[k])) we_eff[k] = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) we_q <= '0;
    else     we_q <= we_eff;
    waddr_q <= waddr;
    wdata_q <= wdata;
  end

  // Read addresses of the copies: copy c of bank k serves write port c (c < k)
  // or c + 1 (c >= k) while c < NW - 1, and read port c - (NW - 1) after that.
  always_comb begin
    for (int k = 0; k < NW; k++)
      for (int c = 0; c < NC; c++)
        if (c < NW - 1) cp_raddr[k][c] = waddr[(c < k) ? c : c + 1];
        else            cp_raddr[k][c] = raddr[c - (NW - 1)];
  end

  // Word to store for port k: its data XOR the other banks' copies read for k.
  always_comb begin
    for (int k = 0; k < NW; k++) begin
      wenc[k] = wdata_q[k];
      for (int j = 0; j < NW; j++)
        if (j != k) wenc[k] ^= cp_rdata[j][(k < j) ? k : k - 1];
    end
  end

  for (genvar k = 0; k < NW; k++) begin : g_bank
    for (genvar c = 0; c < NC; c++) begin : g_copy
      bram_sdp #(.DEPTH(DEPTH), .WIDTH(WIDTH), .WRITE_FIRST(1'b1)) u_bram (
        .clk  (clk),
        .we   (we_q[k] && !rst),
        .waddr(waddr_q[k]),
        .wdata(wenc[k]),
        .raddr(cp_raddr[k][c]),
        .rdata(cp_rdata[k][c])
      );
    end
  end

  // Read: XOR of every bank's read-port copy.
  always_comb begin
    for (int r = 0; r < NR; r++) begin
      rdata[r] = '0;
      for (int k = 0; k < NW; k++) rdata[r] ^= cp_rdata[k][NW - 1 + r];
    end
  end
endmodule
