// lvt_table_tb: self-checking test of the live value table (4 writes, 4 reads).
//
// Random write enables and addresses (from a small address range, so that ports
// often write the same address in one cycle) are applied together with four
// random read addresses. A reference table records, per address, the number of
// the highest-numbered port that wrote it; each rsel is checked one cycle after
// its read address (read-first). The number of same-address write collisions is
// counted and must be non-zero.
module lvt_table_tb;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned NW    = 4;
  localparam int unsigned NR    = 4;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned SW    = $clog2(NW);

  logic                  clk = 1'b0;
  logic [NW-1:0]         we;
  logic [NW-1:0][AW-1:0] waddr;
  logic [NR-1:0][AW-1:0] raddr;
  logic [NR-1:0][SW-1:0] rsel;
  logic [SW-1:0]         model [DEPTH];
  logic [NR-1:0][SW-1:0] exp_q;
  int checks = 0, failures = 0, collisions = 0;
  bit have_exp = 1'b0;

  always #5 clk = ~clk;

  lvt_table #(.DEPTH(DEPTH), .NW(NW), .NR(NR)) dut (
    .clk(clk), .we(we), .waddr(waddr), .raddr(raddr), .rsel(rsel));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    we = '0; waddr = '0; raddr = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (have_exp)
        for (int r = 0; r < NR; r++) begin
          checks++;
          if (rsel[r] !== exp_q[r]) begin
            failures++;
            $display("read %0d mismatch: got %0d expected %0d", r, rsel[r], exp_q[r]);
          end
        end
      we = NW'($urandom);
      for (int w = 0; w < NW; w++) waddr[w] = AW'($urandom % 6);
      for (int r = 0; r < NR; r++) raddr[r] = AW'($urandom % 6);
      for (int r = 0; r < NR; r++) exp_q[r] = model[raddr[r]];
      have_exp = 1'b1;
      for (int w = 0; w < NW; w++) begin
        if (we[w]) model[waddr[w]] = SW'(w);
        for (int v = w + 1; v < NW; v++)
          if (we[w] && we[v] && waddr[w] == waddr[v]) collisions++;
      end
    end
    if (collisions == 0) begin
      failures++;
      $display("no same-address write collision was exercised");
    end
    $display("write collisions exercised: %0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
