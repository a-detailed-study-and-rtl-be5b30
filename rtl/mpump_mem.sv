// mpump_mem: multipumped memory, NP write ports and NP read ports on one memory.
//
// A single DEPTH x WIDTH simple dual-port block RAM serves all ports by running
// NP internal cycles for every external cycle; `clk` is the internal clock and
// the external rate is clk/NP. A phase counter (0..NP-1, cleared by rst) marks
// the cycle in which `accept` is high (no memory write happens while rst is high): on that edge all port inputs are sampled.
// Port 1 (index 0) goes straight to the memory in phase 0; ports 2..NP are held
// in registers (r1..r(NP-1)) until their phase. In phase p a multiplexer applies
// the write and the read address of port p. The read word returns one cycle
// later and a demultiplexer steers it to the holding register of port p; when
// the last port's word arrives all NP results are loaded into rdata together and
// rvalid pulses. rdata and rvalid therefore appear NP+1 cycles after the accept
// cycle and stay until the next update. Because port p is served in phase p, a
// read sees the writes of lower-numbered ports of the same external cycle but not
// its own, and on equal write addresses the highest-numbered port is written
// last and wins. The mux, registers, single memory and demux are the document's;
// the phase schedule, the ordering and the output timing are this design's.
module mpump_mem #(
  parameter int unsigned DEPTH = mpmem_pkg::MEM_DEPTH,
  parameter int unsigned WIDTH = mpmem_pkg::MEM_WIDTH,
  parameter int unsigned NP    = mpmem_pkg::MEM_PORTS,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned PW = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  output logic                     accept,
  input  logic [NP-1:0]            we,
  input  logic [NP-1:0][AW-1:0]    waddr,
  input  logic [NP-1:0][WIDTH-1:0] wdata,
  input  logic [NP-1:0][AW-1:0]    raddr,
  output logic [NP-1:0][WIDTH-1:0] rdata,
  output logic                     rvalid
);
  logic [PW-1:0]            phase;
  // Pending requests of ports 2..NP (index 0 is unused: port 1 is not held).
  logic [NP-1:0]            we_q;
  logic [NP-1:0][AW-1:0]    waddr_q;
  logic [NP-1:0][WIDTH-1:0] wdata_q;
  logic [NP-1:0][AW-1:0]    raddr_q;
  // Memory side of the multiplexer.
  logic                     m_we;
  logic [AW-1:0]            m_waddr;
  logic [WIDTH-1:0]         m_wdata;
  logic [AW-1:0]            m_raddr;
  logic [WIDTH-1:0]         m_rdata;
  // Which port the word on m_rdata belongs to.
  logic [PW-1:0]            rphase;
  logic                     rphase_vld;
  logic [NP-1:0][WIDTH-1:0] rbuf;

  assign accept = (phase == '0);

  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else     phase <= (phase == PW'(NP - 1)) ? '0 : phase + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      we_q <= '0;
    end else if (accept) begin
      we_q    <= we;
      waddr_q <= waddr;
      wdata_q <= wdata;
      raddr_q <= raddr;
    end
  end

  always_comb begin
    if (phase == '0) begin
      m_we    = we[0];
      m_waddr = waddr[0];
      m_wdata = wdata[0];
      m_raddr = raddr[0];
    end else begin
      m_we    = we_q[phase];
      m_waddr = waddr_q[phase];
      m_wdata = wdata_q[phase];
      m_raddr = raddr_q[phase];
    end
  end

  bram_sdp #(.DEPTH(DEPTH), .WIDTH(WIDTH), .WRITE_FIRST(1'b0)) u_mem (
    .clk  (clk),
    .we   (m_we && !rst),
    .waddr(m_waddr),
    .wdata(m_wdata),
    .raddr(m_raddr),
    .rdata(m_rdata)
  );

  // Demultiplexer: collect the words of one external cycle, publish them at once.
  always_ff @(posedge clk) begin
    if (rst) begin
      rphase     <= '0;
      rphase_vld <= 1'b0;
      rvalid     <= 1'b0;
      rdata      <= '0;
      rbuf       <= '0;
    end else begin
      rphase     <= phase;
      rphase_vld <= 1'b1;
      rvalid     <= 1'b0;
      if (rphase_vld) begin
        rbuf[rphase] <= m_rdata;
        if (rphase == PW'(NP - 1)) begin
          for (int p = 0; p < NP - 1; p++) rdata[p] <= rbuf[p];
          rdata[NP-1] <= m_rdata;
          rvalid      <= 1'b1;
        end
      end
    end
  end
endmodule
