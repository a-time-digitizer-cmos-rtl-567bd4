// Four-channel pipelined time digitizer (top level).
// Each channel samples its input 32 times per clock period with a PLL-locked
// asymmetric ring oscillator and writes one 12-bit record per period
// (rising-edge and falling-edge position, each with a hit tag) into a
// 128-period ring buffer, so the whole history of the inputs is kept for
// 128 clock periods with no dead time, while triggered data are read out at
// the read pointer. Two channel pairs each share a 24-bit memory and an
// output control; the CSR block holds both pointers and the mode bits.
// Pipeline clock: the clock pin when div4_mode = 0. With div4_mode = 1 the
// PLLs run the oscillators at four times the clock and the pipeline runs
// from node A of channel 0, so one record is still written per oscillator
// period. All digital state resets with rst_n (asynchronous, active low).
// Read-out timing: the word at read pointer value p appears on out_data /
// out_strobe / bus_data two pipeline clocks after raddr = p, together with
// rd_addr = p. A record written at the pclk edge m describes the period
// whose bit k sampled at (m - 2 + 1/2 + k/32) periods after the pclk edge
// used as time 0.
// The receivers of the original chip are analog and not part of this
// model: clk and tin are logic-level inputs and the receiver mode bits are
// brought out on rx_diff. The x4 mode pin, the reset and the register map
// are this design's own choices.
`timescale 1ns/1fs
module tmc_teg3
  import tmc_pkg::*;
#(
  parameter int  N      = NTAP,
  parameter int  NWORDS = tmc_pkg::DEPTH,
  parameter int  PTR_W  = $clog2(NWORDS),
  parameter real CVG_PF = 100.0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   div4_mode,
  input  logic [3:0]             tin,
  input  logic [1:0]             csr_addr,
  input  logic                   csr_we,
  input  logic [CSR_W-1:0]       csr_wdata,
  output logic [CSR_W-1:0]       csr_rdata,
  input  logic                   write_ctrl,
  input  logic                   read_en,
  input  logic                   read_inc,
  output logic [PTR_W-1:0]       rd_addr,
  output logic [7:0][CODE_W-1:0] out_data,
  output logic [7:0]             out_strobe,
  output logic [CH_W-1:0]        bus_data,
  output logic [4:0]             rx_diff,
  output logic                   pclk,
  output real                    vgn0,
  output real                    vgn1,
  output real                    vgn2,
  output real                    vgn3
);
  ctrl_t                  ctrl;
  logic                   we;
  logic [PTR_W-1:0]       waddr, raddr, raddr_q1;
  logic [1:0]             node_a;
  logic [1:0][1:0][CH_W-1:0] bus_word;

  assign pclk = div4_mode ? node_a[0] : clk;

  tmc_csr #(.PTR_W(PTR_W)) u_csr (
    .clk(pclk), .rst_n(rst_n), .csr_addr(csr_addr), .csr_we(csr_we),
    .csr_wdata(csr_wdata), .csr_rdata(csr_rdata), .write_ctrl(write_ctrl),
    .read_inc(read_inc), .ctrl(ctrl), .rx_diff(rx_diff), .we(we),
    .waddr(waddr), .raddr(raddr));

  tmc_pair #(.N(N), .NWORDS(NWORDS), .PTR_W(PTR_W), .CVG_PF(CVG_PF)) u_pair0 (
    .pclk(pclk), .ref_clk(clk), .rst_n(rst_n), .div4(div4_mode), .tin(tin[1:0]),
    .we(we), .waddr(waddr), .raddr(raddr), .read_en(read_en),
    .zero_supp(ctrl.zero_supp), .slow_mode(ctrl.slow_mode),
    .out_data(out_data[3:0]), .out_strobe(out_strobe[3:0]), .bus_word(bus_word[0]),
    .node_a(node_a[0]), .vgn_a(vgn0), .vgn_b(vgn1));

  tmc_pair #(.N(N), .NWORDS(NWORDS), .PTR_W(PTR_W), .CVG_PF(CVG_PF)) u_pair1 (
    .pclk(pclk), .ref_clk(clk), .rst_n(rst_n), .div4(div4_mode), .tin(tin[3:2]),
    .we(we), .waddr(waddr), .raddr(raddr), .read_en(read_en),
    .zero_supp(ctrl.zero_supp), .slow_mode(ctrl.slow_mode),
    .out_data(out_data[7:4]), .out_strobe(out_strobe[7:4]), .bus_word(bus_word[1]),
    .node_a(node_a[1]), .vgn_a(vgn2), .vgn_b(vgn3));

  // Read address of the word currently on the outputs.
  always_ff @(posedge pclk or negedge rst_n) begin
    if (!rst_n) begin
      raddr_q1 <= '0;
      rd_addr  <= '0;
    end else begin
      raddr_q1 <= raddr;
      rd_addr  <= raddr_q1;
    end
  end

  // 12-bit slow read-out bus: the channel chosen by CTRL.slow_ch.
  assign bus_data = bus_word[ctrl.slow_ch[1]][ctrl.slow_ch[0]];
endmodule
