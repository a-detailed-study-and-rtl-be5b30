// xor_mem_tb: self-checking test of the XOR-based memory.
//
// Two instances run: the default two-write, one-read memory and a three-write,
// two-read one, which checks the generalised bank copies. First the worked
// example of the two-port memory: port 1 writes 81h to address 01h, then port 0
// writes 09h to the same address; bank A must then hold 09h ^ 81h = 88h and a
// read of address 01h must return 09h. Then random traffic runs on both
// memories, checked against an ideal multi-ported memory (a read returns the
// state before its cycle, one cycle later; same-cycle writes to one address keep
// the highest port's word). Small address ranges make three cases frequent, and
// each is counted and must occur: a write to an address another port wrote in
// the previous cycle, two ports writing one address in the same cycle, and a
// read of an address written in the previous cycle.
module xor_mem_tb;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned NW1 = 2, NR1 = 1;  // default configuration
  localparam int unsigned NW2 = 3, NR2 = 2;  // larger configuration

  logic clk = 1'b0;
  logic rst;
  logic [NW1-1:0]            we1;
  logic [NW1-1:0][AW-1:0]    waddr1;
  logic [NW1-1:0][WIDTH-1:0] wdata1;
  logic [NR1-1:0][AW-1:0]    raddr1;
  logic [NR1-1:0][WIDTH-1:0] rdata1;
  logic [NW2-1:0]            we2;
  logic [NW2-1:0][AW-1:0]    waddr2;
  logic [NW2-1:0][WIDTH-1:0] wdata2;
  logic [NR2-1:0][AW-1:0]    raddr2;
  logic [NR2-1:0][WIDTH-1:0] rdata2;

  logic [WIDTH-1:0] model1 [DEPTH];
  logic [WIDTH-1:0] model2 [DEPTH];
  logic [NR1-1:0][WIDTH-1:0] exp1;
  logic [NR2-1:0][WIDTH-1:0] exp2;
  logic [DEPTH-1:0] written_last1, written_last2;  // written in the previous cycle
  int   port_last2 [DEPTH];
  bit   have_exp = 1'b0;
  int checks = 0, failures = 0;
  int cross_b2b = 0, same_cycle = 0, raw_next = 0;

  always #5 clk = ~clk;

  xor_mem dut1 (
    .clk(clk), .rst(rst), .we(we1), .waddr(waddr1), .wdata(wdata1), .raddr(raddr1), .rdata(rdata1));
  xor_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NW(NW2), .NR(NR2)) dut2 (
    .clk(clk), .rst(rst), .we(we2), .waddr(waddr2), .wdata(wdata2), .raddr(raddr2), .rdata(rdata2));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIDTH-1:0] got, input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // One cycle of random traffic on both memories; checks the previous cycle's reads.
  task automatic step_random();
    logic [DEPTH-1:0] now1, now2;
    int               port_now2 [DEPTH];
    @(negedge clk);
    if (have_exp) begin
      for (int r = 0; r < NR1; r++) check(rdata1[r], exp1[r], "2W/1R read");
      for (int r = 0; r < NR2; r++) check(rdata2[r], exp2[r], "3W/2R read");
    end
    we1 = NW1'($urandom);
    we2 = NW2'($urandom);
    for (int p = 0; p < NW1; p++) begin waddr1[p] = AW'($urandom % 4); wdata1[p] = WIDTH'($urandom); end
    for (int p = 0; p < NW2; p++) begin waddr2[p] = AW'($urandom % 4); wdata2[p] = WIDTH'($urandom); end
    for (int r = 0; r < NR1; r++) raddr1[r] = AW'($urandom % 4);
    for (int r = 0; r < NR2; r++) raddr2[r] = AW'($urandom % 4);
    for (int r = 0; r < NR1; r++) begin
      exp1[r] = model1[raddr1[r]];
      if (written_last1[raddr1[r]]) raw_next++;
    end
    for (int r = 0; r < NR2; r++) exp2[r] = model2[raddr2[r]];
    have_exp = 1'b1;
    now1 = '0; now2 = '0;
    for (int a = 0; a < DEPTH; a++) port_now2[a] = -1;
    for (int p = 0; p < NW1; p++)
      if (we1[p]) begin
        if (now1[waddr1[p]]) same_cycle++;
        model1[waddr1[p]] = wdata1[p];
        now1[waddr1[p]] = 1'b1;
      end
    for (int p = 0; p < NW2; p++)
      if (we2[p]) begin
        if (port_last2[waddr2[p]] >= 0 && port_last2[waddr2[p]] != p) cross_b2b++;
        model2[waddr2[p]] = wdata2[p];
        now2[waddr2[p]] = 1'b1;
        port_now2[waddr2[p]] = p;
      end
    written_last1 = now1;
    written_last2 = now2;
    port_last2 = port_now2;
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin model1[a] = '0; model2[a] = '0; port_last2[a] = -1; end
    written_last1 = '0; written_last2 = '0;
    rst = 1'b1;
    we1 = '0; waddr1 = '0; wdata1 = '0; raddr1 = '0;
    we2 = '0; waddr2 = '0; wdata2 = '0; raddr2 = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // Worked example: port 1 writes 81h, then port 0 writes 09h, both at 01h.
    we1 = 2'b10; waddr1[1] = AW'(1); wdata1[1] = 8'h81;
    @(negedge clk);
    we1 = 2'b01; waddr1[0] = AW'(1); wdata1[0] = 8'h09;
    @(negedge clk);
    we1 = '0; raddr1[0] = AW'(1);
    @(negedge clk);
    check(dut1.g_bank[0].g_copy[0].u_bram.mem[1], 8'h88, "bank A at 01h");
    check(dut1.g_bank[1].g_copy[0].u_bram.mem[1], 8'h81, "bank B at 01h");
    check(rdata1[0], 8'h09, "example read of 01h");
    model1[1] = 8'h09;
    for (int n = 0; n < 3000; n++) step_random();
    @(negedge clk);
    for (int r = 0; r < NR1; r++) check(rdata1[r], exp1[r], "2W/1R read");
    for (int r = 0; r < NR2; r++) check(rdata2[r], exp2[r], "3W/2R read");
    $display("cross-port back-to-back writes %0d, same-cycle collisions %0d, reads right after a write %0d",
             cross_b2b, same_cycle, raw_next);
    if (cross_b2b == 0 || same_cycle == 0 || raw_next == 0) begin
      failures++;
      $display("a hazard case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
