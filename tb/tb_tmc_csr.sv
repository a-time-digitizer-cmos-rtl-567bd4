// Self-checking test of tmc_csr: register write/read-back, pointer loads,
// write pointer advancing only while recording is enabled (CTRL.rec_en and
// write_ctrl, not in slow mode), read pointer advancing every clock in
// rd_sync mode and once per read_inc rising edge otherwise, and the 7-bit
// wrap-around of both pointers. A cycle-level reference model runs beside.
`timescale 1ns/1fs
module tb_tmc_csr;
  import tmc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] csr_addr = 0;
  logic csr_we = 0;
  logic [7:0] csr_wdata = 0, csr_rdata;
  logic write_ctrl = 0, read_inc = 0;
  ctrl_t ctrl;
  logic [4:0] rx_diff;
  logic we;
  logic [6:0] waddr, raddr;
  int checks = 0, failures = 0;
  int m_w = 0, m_r = 0;
  logic inc_q = 0;

  tmc_csr dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk); csr_addr = a; csr_wdata = d; csr_we = 1;
    @(negedge clk); csr_we = 0;
  endtask

  task automatic rd_check(input logic [1:0] a, input logic [7:0] e, input string what);
    csr_addr = a; #1; checks++;
    if (csr_rdata !== e) begin failures++; $display("FAIL %s: %h exp %h", what, csr_rdata, e); end
  endtask

  // reference pointers, updated on the same edges as the block
  always @(posedge clk) begin
    if (rst_n) begin
      if (!(csr_we && csr_addr == CSR_WPTR) && ctrl.rec_en && write_ctrl && !ctrl.slow_mode)
        m_w = (m_w + 1) % 128;
      if (!(csr_we && csr_addr == CSR_RPTR) && (ctrl.rd_sync || (read_inc && !inc_q)))
        m_r = (m_r + 1) % 128;
    end
    inc_q = read_inc;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    rd_check(CSR_CTRL, 8'h00, "ctrl after reset");
    rd_check(CSR_WPTR, 8'h00, "wptr after reset");
    wr(CSR_RX, 8'h15); rd_check(CSR_RX, 8'h15, "rx");
    checks++; if (rx_diff !== 5'h15) begin failures++; $display("FAIL rx"); end
    wr(CSR_WPTR, 8'd120); m_w = 120;
    wr(CSR_RPTR, 8'd100); m_r = 100;
    rd_check(CSR_WPTR, 8'd120, "wptr load");
    rd_check(CSR_RPTR, 8'd100, "rptr load");
    // recording with the read pointer running: distance must stay 20
    write_ctrl = 1;
    wr(CSR_CTRL, 8'b0000_0011); // rec_en, rd_sync
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n == 100) write_ctrl = 0;
      if (n == 120) write_ctrl = 1;
      #1;
      checks += 2;
      if (waddr !== 7'(m_w)) begin failures++; $display("FAIL waddr %0d exp %0d", waddr, m_w); end
      if (raddr !== 7'(m_r)) begin failures++; $display("FAIL raddr %0d exp %0d", raddr, m_r); end
      checks++;
      if (we !== write_ctrl) begin failures++; $display("FAIL we n=%0d", n); end
    end
    // slow read-out: writing stops, read pointer on read_inc edges only
    wr(CSR_CTRL, 8'b0000_1001);
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      read_inc = ($urandom_range(0, 2) == 0);
      checks += 3;
      if (we !== 1'b0) begin failures++; $display("FAIL slow we"); end
      if (waddr !== 7'(m_w)) begin failures++; $display("FAIL slow waddr %0d exp %0d", waddr, m_w); end
      if (raddr !== 7'(m_r)) begin failures++; $display("FAIL slow raddr %0d exp %0d", raddr, m_r); end
    end
    rd_check(CSR_CTRL, 8'b0000_1001, "ctrl read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
