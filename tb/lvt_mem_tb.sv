// lvt_mem_tb: self-checking test of the LVT memory (4 writes, 4 reads, 32 x 8).
//
// A reference array is the ideal 4W/4R memory: reads return the word stored
// before the current cycle, writes of one cycle are applied in port order so
// that the highest-numbered port wins. The test first writes all 32 words from
// the four ports in turn and reads them back on all ports (every bank must be
// chosen by the table), then runs random traffic on all eight ports with a small
// address range so that reads in the cycle right after a write, and
// same-address writes, are frequent. Reads are checked one cycle after their
// address. The number of reads served by each bank is counted and every bank
// must have served some.
module lvt_mem_tb;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned NW    = 4;
  localparam int unsigned NR    = 4;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic                     clk = 1'b0;
  logic [NW-1:0]            we;
  logic [NW-1:0][AW-1:0]    waddr;
  logic [NW-1:0][WIDTH-1:0] wdata;
  logic [NR-1:0][AW-1:0]    raddr;
  logic [NR-1:0][WIDTH-1:0] rdata;
  logic [WIDTH-1:0]         model [DEPTH];
  int                       owner [DEPTH];
  logic [NR-1:0][WIDTH-1:0] exp_q;
  int                       exp_owner [NR];
  int checks = 0, failures = 0;
  int served [NW];
  bit have_exp = 1'b0;

  always #5 clk = ~clk;

  lvt_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NW(NW), .NR(NR)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [NW-1:0] w, input logic [NW-1:0][AW-1:0] wa,
                      input logic [NW-1:0][WIDTH-1:0] wd, input logic [NR-1:0][AW-1:0] ra);
    @(negedge clk);
    if (have_exp)
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (exp_owner[r] >= 0) served[exp_owner[r]]++;
        if (rdata[r] !== exp_q[r]) begin
          failures++;
          $display("port %0d mismatch: got %h expected %h", r, rdata[r], exp_q[r]);
        end
      end
    we = w; waddr = wa; wdata = wd; raddr = ra;
    for (int r = 0; r < NR; r++) begin
      exp_q[r] = model[ra[r]];
      exp_owner[r] = owner[ra[r]];
    end
    have_exp = 1'b1;
    for (int p = 0; p < NW; p++)
      if (w[p]) begin
        model[wa[p]] = wd[p];
        owner[wa[p]] = p;
      end
  endtask

  initial begin
    logic [NW-1:0][AW-1:0]    wa;
    logic [NW-1:0][WIDTH-1:0] wd;
    logic [NR-1:0][AW-1:0]    ra;
    for (int i = 0; i < DEPTH; i++) begin model[i] = '0; owner[i] = -1; end
    for (int p = 0; p < NW; p++) served[p] = 0;
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    // Fill: address a is written by port a % 4, four addresses per cycle.
    for (int a = 0; a < DEPTH; a += NW) begin
      for (int p = 0; p < NW; p++) begin wa[p] = AW'(a + p); wd[p] = WIDTH'(8'h40 + a + p); end
      step('1, wa, wd, '0);
    end
    for (int a = 0; a < DEPTH; a++) begin
      for (int r = 0; r < NR; r++) ra[r] = AW'(a + 5 * r);
      step('0, '0, '0, ra);
    end
    for (int n = 0; n < 2000; n++) begin
      for (int p = 0; p < NW; p++) begin wa[p] = AW'($urandom % 8); wd[p] = WIDTH'($urandom); end
      for (int r = 0; r < NR; r++) ra[r] = AW'($urandom % 8);
      step(NW'($urandom), wa, wd, ra);
    end
    step('0, '0, '0, '0);
    for (int p = 0; p < NW; p++) begin
      $display("reads served by bank %0d: %0d", p, served[p]);
      if (served[p] == 0) begin
        failures++;
        $display("bank %0d never served a read", p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
