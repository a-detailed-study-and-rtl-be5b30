// rep_mem_tb: self-checking test of the replicated memory (1 write, 4 reads).
//
// First every address is read on all four ports to check the zero start, then
// the 32 words are written once with known data and read back by all ports at
// different addresses, then a random mix of writes and four-port reads runs,
// checked against a reference array. Reads are checked one cycle after their
// address (read-first: a read in the cycle of a write to the same address
// returns the old word). Inputs change on the falling edge.
module rep_mem_tb;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned NR    = 4;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic                     clk = 1'b0;
  logic                     we;
  logic [AW-1:0]            waddr;
  logic [WIDTH-1:0]         wdata;
  logic [NR-1:0][AW-1:0]    raddr;
  logic [NR-1:0][WIDTH-1:0] rdata;
  logic [WIDTH-1:0]         model [DEPTH];
  logic [NR-1:0][WIDTH-1:0] exp_q;
  int checks = 0, failures = 0;
  bit have_exp = 1'b0;

  always #5 clk = ~clk;

  rep_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NR(NR)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic w, input logic [AW-1:0] wa, input logic [WIDTH-1:0] wd,
                      input logic [NR-1:0][AW-1:0] ra);
    @(negedge clk);
    if (have_exp)
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (rdata[r] !== exp_q[r]) begin
          failures++;
          $display("port %0d mismatch: got %h expected %h", r, rdata[r], exp_q[r]);
        end
      end
    we = w; waddr = wa; wdata = wd; raddr = ra;
    for (int r = 0; r < NR; r++) exp_q[r] = model[ra[r]];
    have_exp = 1'b1;
    if (w) model[wa] = wd;
  endtask

  initial begin
    logic [NR-1:0][AW-1:0] ra;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int a = 0; a < DEPTH; a++) begin
      for (int r = 0; r < NR; r++) ra[r] = AW'(a + r);
      step(1'b0, '0, '0, ra);
    end
    for (int a = 0; a < DEPTH; a++) begin
      for (int r = 0; r < NR; r++) ra[r] = AW'(a + 3 * r);
      step(1'b1, AW'(a), WIDTH'(8'h20 + a), ra);
    end
    for (int n = 0; n < 1500; n++) begin
      for (int r = 0; r < NR; r++) ra[r] = AW'($urandom);
      step(($urandom % 2) == 0, AW'($urandom), WIDTH'($urandom), ra);
    end
    step(1'b0, '0, '0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
