// mpump_mem_tb: self-checking test of the multipumped memory (4 ports, 32 x 8).
//
// A new four-port request (four writes, four reads) is applied in every cycle in
// which `accept` is high, i.e. once every four internal cycles, and random junk
// is driven on the inputs in the other cycles to show that pending requests are
// held in the block's own registers. The reference model serves the ports in
// order: port p's read sees the writes of ports 0..p-1 of the same request, then
// port p's write is applied. Each result is checked when rvalid pulses, and the
// latency (4 clock edges from the sampling edge to rvalid) and the spacing of
// accept (every 4 cycles) are checked too. Addresses come from a small range so
// that same-cycle write/read overlaps between ports are frequent; their number
// is counted and must be non-zero.
module mpump_mem_tb;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned NP    = 4;
  localparam int unsigned AW    = $clog2(DEPTH);

  typedef struct {
    logic [NP-1:0][WIDTH-1:0] data;
    int                       edge_no;
  } exp_t;

  logic                     clk = 1'b0;
  logic                     rst;
  logic                     accept;
  logic [NP-1:0]            we;
  logic [NP-1:0][AW-1:0]    waddr, raddr;
  logic [NP-1:0][WIDTH-1:0] wdata;
  logic [NP-1:0][WIDTH-1:0] rdata;
  logic                     rvalid;
  logic [WIDTH-1:0]         model [DEPTH];
  exp_t                     expq [$];
  int checks = 0, failures = 0, overlaps = 0, requests = 0, results = 0;
  int edges = 0, last_accept = -1;
  bit draining = 1'b0;  // no new requests: results of idle accept cycles are ignored

  always #5 clk = ~clk;
  always @(posedge clk) edges++;

  mpump_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NP(NP)) dut (
    .clk(clk), .rst(rst), .accept(accept), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(rdata), .rvalid(rvalid));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: results arrive with rvalid, in request order, NP edges after sampling.
  always @(negedge clk) begin
    if (!rst && rvalid && !(draining && expq.size() == 0)) begin
      exp_t e;
      results++;
      if (expq.size() == 0) begin
        failures++;
        $display("rvalid without a pending request");
      end else begin
        e = expq.pop_front();
        for (int p = 0; p < NP; p++) begin
          checks++;
          if (rdata[p] !== e.data[p]) begin
            failures++;
            $display("port %0d mismatch: got %h expected %h", p, rdata[p], e.data[p]);
          end
        end
        checks++;
        if (edges - e.edge_no != NP) begin
          failures++;
          $display("latency %0d edges, expected %0d", edges - e.edge_no, NP);
        end
      end
    end
  end

  initial begin
    exp_t e;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    rst = 1'b1; we = '0; waddr = '0; wdata = '0; raddr = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (requests < 400) begin
      if (accept) begin
        if (last_accept >= 0) begin
          checks++;
          if (edges - last_accept != NP) begin
            failures++;
            $display("accept spacing %0d, expected %0d", edges - last_accept, NP);
          end
        end
        last_accept = edges;
        we = NP'($urandom);
        for (int p = 0; p < NP; p++) begin
          waddr[p] = AW'($urandom % 6);
          raddr[p] = AW'($urandom % 6);
          wdata[p] = WIDTH'($urandom);
        end
        for (int p = 0; p < NP; p++) begin
          e.data[p] = model[raddr[p]];
          for (int q = 0; q < p; q++) if (we[q] && waddr[q] == raddr[p]) overlaps++;
          if (we[p]) model[waddr[p]] = wdata[p];
        end
        e.edge_no = edges + 1;  // sampled on the coming rising edge
        expq.push_back(e);
        requests++;
      end else begin
        we = NP'($urandom);
        for (int p = 0; p < NP; p++) begin
          waddr[p] = AW'($urandom); raddr[p] = AW'($urandom); wdata[p] = WIDTH'($urandom);
        end
      end
      @(negedge clk);
    end
    we = '0;
    draining = 1'b1;
    repeat (3 * NP) @(negedge clk);
    checks++;
    if (results != requests || expq.size() != 0) begin
      failures++;
      $display("%0d requests, %0d results", requests, results);
    end
    if (overlaps == 0) begin
      failures++;
      $display("no read after a lower port's write in one request was exercised");
    end
    $display("requests %0d, write-then-read overlaps %0d", requests, overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
