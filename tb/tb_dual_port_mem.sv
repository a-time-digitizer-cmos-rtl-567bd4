// Self-checking test of dual_port_mem: fills all 128 words, then writes
// and reads in the same cycles at a fixed pointer distance as in ring
// buffer use, comparing with a reference array; checks the one-clock read
// latency and read-before-write on an address collision.
`timescale 1ns/1fs
module tb_dual_port_mem;
  localparam int W = 24, D = 128;
  logic clk = 0, we;
  logic [6:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  logic [W-1:0] exp_r;
  int checks = 0, failures = 0;

  dual_port_mem #(.W(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < D; a++) begin
      we = 1; waddr = 7'(a); wdata = W'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    // ring-buffer operation: read 37 words behind the write pointer
    for (int n = 0; n < 1000; n++) begin
      we = ($urandom_range(0, 3) != 0);
      waddr = 7'(n); raddr = 7'(n - 37);
      if ((n % 50) == 7) raddr = waddr;        // collision: old value expected
      wdata = W'($urandom);
      exp_r = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1; checks++;
      if (rdata !== exp_r) begin failures++; $display("FAIL n=%0d rdata=%h exp %h", n, rdata, exp_r); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
