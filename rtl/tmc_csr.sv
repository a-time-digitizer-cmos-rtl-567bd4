// Control and status registers with the two ring-buffer pointers.
// Four 8-bit registers are reached through a simple synchronous port
// (csr_addr, csr_we, csr_wdata; csr_rdata is combinational):
//   0 CTRL  control bits (tmc_pkg::ctrl_t)
//   1 WPTR  write pointer: a write loads it, a read returns its value
//   2 RPTR  read pointer: a write loads it, a read returns its value
//   3 RX    receiver modes, bit c = differential input for channel c,
//           bit 4 = differential clock input
// The write pointer advances by one every clock while recording is enabled
// (CTRL.rec_en and the write_ctrl pin, and not in slow read-out mode); the
// memory is written at the same time, so it forms a ring buffer holding the
// last DEPTH clock periods. The read pointer advances every clock when
// CTRL.rd_sync is set, otherwise once per rising edge of the read_inc pin.
// A trigger latency is set by loading RPTR = WPTR - latency.
// That the chip has four CSRs holding the pointers and mode bits comes from
// the original; the register map, widths and the reset values (all zero)
// are this design's own.
`timescale 1ns/1fs
module tmc_csr
  import tmc_pkg::*;
#(
  parameter int PTR_W = tmc_pkg::AW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       csr_addr,
  input  logic             csr_we,
  input  logic [CSR_W-1:0] csr_wdata,
  output logic [CSR_W-1:0] csr_rdata,
  input  logic             write_ctrl,  // Write Control pin
  input  logic             read_inc,    // external read-pointer increment
  output ctrl_t            ctrl,
  output logic [4:0]       rx_diff,
  output logic             we,          // memory write enable
  output logic [PTR_W-1:0]    waddr,
  output logic [PTR_W-1:0]    raddr
);
  logic read_inc_q;
  logic wr_ctrl, wr_wptr, wr_rptr, wr_rx;

  assign wr_ctrl = csr_we && csr_addr == CSR_CTRL;
  assign wr_wptr = csr_we && csr_addr == CSR_WPTR;
  assign wr_rptr = csr_we && csr_addr == CSR_RPTR;
  assign wr_rx   = csr_we && csr_addr == CSR_RX;

  assign we = ctrl.rec_en && write_ctrl && !ctrl.slow_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl       <= '0;
      rx_diff    <= '0;
      waddr      <= '0;
      raddr      <= '0;
      read_inc_q <= 1'b0;
    end else begin
      read_inc_q <= read_inc;
      if (wr_ctrl) ctrl    <= ctrl_t'(csr_wdata);
      if (wr_rx)   rx_diff <= csr_wdata[4:0];
      if (wr_wptr)      waddr <= csr_wdata[PTR_W-1:0];
      else if (we)      waddr <= waddr + 1'b1;
      if (wr_rptr)      raddr <= csr_wdata[PTR_W-1:0];
      else if (ctrl.rd_sync || (read_inc && !read_inc_q))
                        raddr <= raddr + 1'b1;
    end
  end

  always_comb begin
    unique case (csr_addr)
      CSR_CTRL: csr_rdata = ctrl;
      CSR_WPTR: csr_rdata = CSR_W'(waddr);
      CSR_RPTR: csr_rdata = CSR_W'(raddr);
      CSR_RX:   csr_rdata = CSR_W'(rx_diff);
      default:  csr_rdata = '0;
    endcase
  end
endmodule
