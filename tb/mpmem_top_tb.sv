// mpmem_top_tb: end-to-end test of the top level at its default sizes.
//
// All five memories run at once on one clock with random traffic, each checked
// against its own ideal reference model:
//   replication  one write, four reads of any addresses per cycle;
//   banking      four private write/read pairs on bank-local addresses;
//   multipumping one four-write, four-read request per `accept`, results with
//                rvalid four edges later, ports served in order;
//   LVT          four writes and four reads of any addresses per cycle;
//   XOR          two writes and one read per cycle.
// The mechanisms the organisations rely on are counted and each must occur at
// least once: reads of different addresses on all replication ports in one
// cycle, writes to all four banks in one cycle, multipumped requests whose read
// sees a lower port's write, LVT reads steered to each of the four banks, LVT and
// XOR same-address write collisions, XOR writes to an address another port
// wrote in the previous cycle, and XOR reads right after a write.
module mpmem_top_tb;
  localparam int unsigned DEPTH = mpmem_pkg::MEM_DEPTH;
  localparam int unsigned WIDTH = mpmem_pkg::MEM_WIDTH;
  localparam int unsigned NP    = mpmem_pkg::MEM_PORTS;
  localparam int unsigned XNW   = mpmem_pkg::XOR_NW;
  localparam int unsigned XNR   = mpmem_pkg::XOR_NR;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned BD    = DEPTH / NP;
  localparam int unsigned BAW   = $clog2(BD);
  localparam int unsigned CYCLES = 4000;

  typedef logic [WIDTH-1:0] word_t;

  logic clk = 1'b0;
  logic rst;
  logic                      rep_we;
  logic [AW-1:0]             rep_waddr;
  word_t                     rep_wdata;
  logic [NP-1:0][AW-1:0]     rep_raddr;
  logic [NP-1:0][WIDTH-1:0]  rep_rdata;
  logic [NP-1:0]             bank_we;
  logic [NP-1:0][BAW-1:0]    bank_waddr, bank_raddr;
  logic [NP-1:0][WIDTH-1:0]  bank_wdata, bank_rdata;
  logic                      mp_accept, mp_rvalid;
  logic [NP-1:0]             mp_we;
  logic [NP-1:0][AW-1:0]     mp_waddr, mp_raddr;
  logic [NP-1:0][WIDTH-1:0]  mp_wdata, mp_rdata;
  logic [NP-1:0]             lvt_we;
  logic [NP-1:0][AW-1:0]     lvt_waddr, lvt_raddr;
  logic [NP-1:0][WIDTH-1:0]  lvt_wdata, lvt_rdata;
  logic [XNW-1:0]            xor_we;
  logic [XNW-1:0][AW-1:0]    xor_waddr;
  logic [XNW-1:0][WIDTH-1:0] xor_wdata;
  logic [XNR-1:0][AW-1:0]    xor_raddr;
  logic [XNR-1:0][WIDTH-1:0] xor_rdata;

  // Reference models.
  word_t rep_m [DEPTH];
  word_t bank_m [NP][BD];
  word_t mp_m [DEPTH];
  word_t lvt_m [DEPTH];
  int    lvt_owner [DEPTH];
  word_t xor_m [DEPTH];
  int    xor_port_last [DEPTH];
  logic [DEPTH-1:0] xor_written_last;
  // Expected read data of the previous cycle.
  logic [NP-1:0][WIDTH-1:0]  rep_e, bank_e, lvt_e;
  logic [XNR-1:0][WIDTH-1:0] xor_e;
  int                        lvt_e_owner [NP];
  logic [NP-1:0][WIDTH-1:0]  mp_q [$];
  int                        mp_edge_q [$];
  bit have_exp = 1'b0;
  bit draining = 1'b0;
  int edges = 0;

  int checks = 0, failures = 0;
  int n_rep_parallel = 0, n_bank_all = 0, n_mp_requests = 0, n_mp_overlap = 0;
  int n_lvt_bank [NP];
  int n_lvt_collide = 0, n_xor_b2b = 0, n_xor_collide = 0, n_xor_raw = 0;

  always #5 clk = ~clk;
  always @(posedge clk) edges++;

  mpmem_top dut (.*);

  initial begin : watchdog
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input word_t got, input word_t exp, input string what, input int port);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s port %0d: got %h expected %h", what, port, got, exp);
    end
  endtask

  // Multipumped results, in request order.
  always @(negedge clk) begin
    if (!rst && mp_rvalid && !(draining && mp_q.size() == 0)) begin
      logic [NP-1:0][WIDTH-1:0] e;
      int                       sampled;
      if (mp_q.size() == 0) begin
        failures++;
        $display("multipumping: rvalid without a request");
      end else begin
        e = mp_q.pop_front();
        sampled = mp_edge_q.pop_front();
        for (int p = 0; p < NP; p++) check(mp_rdata[p], e[p], "multipumping", p);
        checks++;
        if (edges - sampled != NP) begin
          failures++;
          $display("multipumping latency %0d edges", edges - sampled);
        end
      end
    end
  end

  task automatic drive_mp();
    logic [NP-1:0][WIDTH-1:0] e;
    bit overlap = 1'b0;
    if (!mp_accept) return;
    mp_we = NP'($urandom);
    for (int p = 0; p < NP; p++) begin
      mp_waddr[p] = AW'($urandom % 8); mp_raddr[p] = AW'($urandom % 8); mp_wdata[p] = word_t'($urandom);
    end
    for (int p = 0; p < NP; p++) begin
      e[p] = mp_m[mp_raddr[p]];
      for (int q = 0; q < p; q++) if (mp_we[q] && mp_waddr[q] == mp_raddr[p]) overlap = 1'b1;
      if (mp_we[p]) mp_m[mp_waddr[p]] = mp_wdata[p];
    end
    if (overlap) n_mp_overlap++;
    mp_q.push_back(e);
    mp_edge_q.push_back(edges + 1);
    n_mp_requests++;
  endtask

  task automatic step();
    logic [DEPTH-1:0] xor_now;
    int               xor_port_now [DEPTH];
    logic [DEPTH-1:0] lvt_now;
    bit               distinct;
    if (have_exp) begin
      for (int p = 0; p < NP; p++) check(rep_rdata[p], rep_e[p], "replication", p);
      for (int p = 0; p < NP; p++) check(bank_rdata[p], bank_e[p], "banking", p);
      for (int p = 0; p < NP; p++) begin
        check(lvt_rdata[p], lvt_e[p], "LVT", p);
        if (lvt_e_owner[p] >= 0) n_lvt_bank[lvt_e_owner[p]]++;
      end
      for (int p = 0; p < XNR; p++) check(xor_rdata[p], xor_e[p], "XOR", p);
    end
    // Replication.
    rep_we = 1'($urandom); rep_waddr = AW'($urandom); rep_wdata = word_t'($urandom);
    for (int p = 0; p < NP; p++) rep_raddr[p] = AW'($urandom);
    for (int p = 0; p < NP; p++) rep_e[p] = rep_m[rep_raddr[p]];
    if (rep_we) rep_m[rep_waddr] = rep_wdata;
    distinct = 1'b1;
    for (int p = 0; p < NP; p++) for (int q = 0; q < p; q++) if (rep_raddr[p] == rep_raddr[q]) distinct = 1'b0;
    if (distinct) n_rep_parallel++;
    // Banking.
    bank_we = NP'($urandom);
    for (int p = 0; p < NP; p++) begin
      bank_waddr[p] = BAW'($urandom); bank_raddr[p] = BAW'($urandom); bank_wdata[p] = word_t'($urandom);
      bank_e[p] = bank_m[p][bank_raddr[p]];
    end
    for (int p = 0; p < NP; p++) if (bank_we[p]) bank_m[p][bank_waddr[p]] = bank_wdata[p];
    if (&bank_we) n_bank_all++;
    // LVT.
    lvt_we = NP'($urandom);
    for (int p = 0; p < NP; p++) begin
      lvt_waddr[p] = AW'($urandom % 8); lvt_raddr[p] = AW'($urandom % 8); lvt_wdata[p] = word_t'($urandom);
      lvt_e[p] = lvt_m[lvt_raddr[p]];
      lvt_e_owner[p] = lvt_owner[lvt_raddr[p]];
    end
    lvt_now = '0;
    for (int p = 0; p < NP; p++)
      if (lvt_we[p]) begin
        if (lvt_now[lvt_waddr[p]]) n_lvt_collide++;
        lvt_now[lvt_waddr[p]] = 1'b1;
        lvt_m[lvt_waddr[p]] = lvt_wdata[p];
        lvt_owner[lvt_waddr[p]] = p;
      end
    // XOR.
    xor_we = XNW'($urandom);
    for (int p = 0; p < XNW; p++) begin xor_waddr[p] = AW'($urandom % 4); xor_wdata[p] = word_t'($urandom); end
    for (int p = 0; p < XNR; p++) begin
      xor_raddr[p] = AW'($urandom % 4);
      xor_e[p] = xor_m[xor_raddr[p]];
      if (xor_written_last[xor_raddr[p]]) n_xor_raw++;
    end
    xor_now = '0;
    for (int a = 0; a < DEPTH; a++) xor_port_now[a] = -1;
    for (int p = 0; p < XNW; p++)
      if (xor_we[p]) begin
        if (xor_now[xor_waddr[p]]) n_xor_collide++;
        if (xor_port_last[xor_waddr[p]] >= 0 && xor_port_last[xor_waddr[p]] != p) n_xor_b2b++;
        xor_now[xor_waddr[p]] = 1'b1;
        xor_port_now[xor_waddr[p]] = p;
        xor_m[xor_waddr[p]] = xor_wdata[p];
      end
    xor_written_last = xor_now;
    xor_port_last = xor_port_now;
    have_exp = 1'b1;
    drive_mp();
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      rep_m[a] = '0; mp_m[a] = '0; lvt_m[a] = '0; xor_m[a] = '0;
      lvt_owner[a] = -1; xor_port_last[a] = -1;
    end
    for (int b = 0; b < NP; b++) begin
      n_lvt_bank[b] = 0;
      for (int a = 0; a < BD; a++) bank_m[b][a] = '0;
    end
    xor_written_last = '0;
    rst = 1'b1;
    rep_we = '0; rep_waddr = '0; rep_wdata = '0; rep_raddr = '0;
    bank_we = '0; bank_waddr = '0; bank_wdata = '0; bank_raddr = '0;
    mp_we = '0; mp_waddr = '0; mp_wdata = '0; mp_raddr = '0;
    lvt_we = '0; lvt_waddr = '0; lvt_wdata = '0; lvt_raddr = '0;
    xor_we = '0; xor_waddr = '0; xor_wdata = '0; xor_raddr = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < CYCLES; n++) begin
      step();
      @(negedge clk);
    end
    // Last cycle's reads, then let the last multipumped request finish.
    for (int p = 0; p < NP; p++) check(rep_rdata[p], rep_e[p], "replication", p);
    for (int p = 0; p < NP; p++) check(bank_rdata[p], bank_e[p], "banking", p);
    for (int p = 0; p < NP; p++) check(lvt_rdata[p], lvt_e[p], "LVT", p);
    for (int p = 0; p < XNR; p++) check(xor_rdata[p], xor_e[p], "XOR", p);
    mp_we = '0;
    draining = 1'b1;
    repeat (3 * NP) @(negedge clk);
    checks++;
    if (mp_q.size() != 0) begin
      failures++;
      $display("multipumping: %0d requests without a result", mp_q.size());
    end
    $display("replication cycles with four distinct read addresses: %0d", n_rep_parallel);
    $display("banking cycles writing all four banks: %0d", n_bank_all);
    $display("multipumped requests: %0d, with a read after a lower port's write: %0d", n_mp_requests, n_mp_overlap);
    for (int b = 0; b < NP; b++) $display("LVT reads served by bank %0d: %0d", b, n_lvt_bank[b]);
    $display("LVT same-cycle write collisions: %0d", n_lvt_collide);
    $display("XOR back-to-back cross-port writes: %0d, collisions: %0d, reads right after a write: %0d",
             n_xor_b2b, n_xor_collide, n_xor_raw);
    if (n_rep_parallel == 0 || n_bank_all == 0 || n_mp_requests == 0 || n_mp_overlap == 0 ||
        n_lvt_collide == 0 || n_xor_b2b == 0 || n_xor_collide == 0 || n_xor_raw == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    for (int b = 0; b < NP; b++)
      if (n_lvt_bank[b] == 0) begin
        failures++;
        $display("LVT bank %0d never served a read", b);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
