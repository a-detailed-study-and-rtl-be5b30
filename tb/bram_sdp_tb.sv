// bram_sdp_tb: self-checking test of the simple dual-port block RAM model.
//
// Two instances are tested side by side, one read-first and one write-first,
// with the same random stream of writes and reads (many on colliding addresses).
// A plain array in the testbench is the reference: a read returns the word
// written before the current cycle, or, for the write-first copy, the word being
// written when the addresses match. Each read is checked one cycle after its
// address is applied (the one-cycle read latency). Inputs change on the falling
// edge, outputs are checked on the next falling edge.
module bram_sdp_tb;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic             clk = 1'b0;
  logic             we;
  logic [AW-1:0]    waddr, raddr;
  logic [WIDTH-1:0] wdata;
  logic [WIDTH-1:0] rdata_rf, rdata_wf;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] exp_rf, exp_wf;
  int checks = 0, failures = 0;
  bit have_exp = 1'b0;

  always #5 clk = ~clk;

  bram_sdp #(.DEPTH(DEPTH), .WIDTH(WIDTH), .WRITE_FIRST(1'b0)) dut_rf (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata_rf));
  bram_sdp #(.DEPTH(DEPTH), .WIDTH(WIDTH), .WRITE_FIRST(1'b1)) dut_wf (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata_wf));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (have_exp) begin
        checks += 2;
        if (rdata_rf !== exp_rf) begin
          failures++;
          $display("read-first mismatch: got %h expected %h", rdata_rf, exp_rf);
        end
        if (rdata_wf !== exp_wf) begin
          failures++;
          $display("write-first mismatch: got %h expected %h", rdata_wf, exp_wf);
        end
      end
      we    = ($urandom % 2) == 0;
      waddr = AW'($urandom % 8);   // a small range makes collisions frequent
      wdata = WIDTH'($urandom);
      raddr = (n < 64) ? AW'(n % DEPTH) : AW'($urandom % 8);
      exp_rf = model[raddr];
      exp_wf = (we && waddr == raddr) ? wdata : model[raddr];
      have_exp = 1'b1;
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
