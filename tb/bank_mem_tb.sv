// bank_mem_tb: self-checking test of the banked memory (four 8-word banks).
//
// Each port writes and reads only its own bank with bank-local addresses. A
// reference array per bank predicts every read (one cycle latency, read-first).
// The test also writes the same local address on all four ports with different
// data in one cycle and checks that each port reads back its own word, which
// shows that the banks are separate memories and not one shared memory.
module bank_mem_tb;
  localparam int unsigned DEPTH  = 32;
  localparam int unsigned WIDTH  = 8;
  localparam int unsigned NB     = 4;
  localparam int unsigned BDEPTH = DEPTH / NB;
  localparam int unsigned BAW    = $clog2(BDEPTH);

  logic                     clk = 1'b0;
  logic [NB-1:0]            we;
  logic [NB-1:0][BAW-1:0]   waddr, raddr;
  logic [NB-1:0][WIDTH-1:0] wdata;
  logic [NB-1:0][WIDTH-1:0] rdata;
  logic [WIDTH-1:0]         model [NB][BDEPTH];
  logic [NB-1:0][WIDTH-1:0] exp_q;
  int checks = 0, failures = 0;
  bit have_exp = 1'b0;

  always #5 clk = ~clk;

  bank_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NB(NB)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [NB-1:0] w, input logic [NB-1:0][BAW-1:0] wa,
                      input logic [NB-1:0][WIDTH-1:0] wd, input logic [NB-1:0][BAW-1:0] ra);
    @(negedge clk);
    if (have_exp)
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (rdata[b] !== exp_q[b]) begin
          failures++;
          $display("bank %0d mismatch: got %h expected %h", b, rdata[b], exp_q[b]);
        end
      end
    we = w; waddr = wa; wdata = wd; raddr = ra;
    for (int b = 0; b < NB; b++) exp_q[b] = model[b][ra[b]];
    have_exp = 1'b1;
    for (int b = 0; b < NB; b++) if (w[b]) model[b][wa[b]] = wd[b];
  endtask

  initial begin
    logic [NB-1:0][BAW-1:0]   wa, ra;
    logic [NB-1:0][WIDTH-1:0] wd;
    for (int b = 0; b < NB; b++) for (int i = 0; i < BDEPTH; i++) model[b][i] = '0;
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    // Same local address 5 on every port, different data per port.
    for (int b = 0; b < NB; b++) begin wa[b] = BAW'(5); wd[b] = WIDTH'(8'h10 * (b + 1)); end
    step('1, wa, wd, '0);
    for (int b = 0; b < NB; b++) ra[b] = BAW'(5);
    step('0, '0, '0, ra);
    step('0, '0, '0, ra);
    for (int n = 0; n < 1500; n++) begin
      for (int b = 0; b < NB; b++) begin
        wa[b] = BAW'($urandom); ra[b] = BAW'($urandom); wd[b] = WIDTH'($urandom);
      end
      step(NB'($urandom), wa, wd, ra);
    end
    step('0, '0, '0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
