// Two channels sharing one dual-port memory and one output control, as in
// the original chip, where a 24-bit x 128-word memory holds 12 bits for
// each of two channels. Every pipeline clock (pclk) the two channel words
// {B, A} are written at waddr when we is high; the word at raddr comes out
// of the memory one clock later and out of the output control one clock
// after that. node_a is tap 0 of channel A, which the top level uses as the
// pipeline clock in the x4 mode.
`timescale 1ns/1fs
module tmc_pair
  import tmc_pkg::*;
#(
  parameter int  N      = NTAP,
  parameter int  NWORDS = tmc_pkg::DEPTH,
  parameter int  PTR_W  = $clog2(NWORDS),
  parameter real CVG_PF = 100.0
) (
  input  logic                   pclk,
  input  logic                   ref_clk,
  input  logic                   rst_n,
  input  logic                   div4,
  input  logic [1:0]             tin,
  input  logic                   we,
  input  logic [PTR_W-1:0]       waddr,
  input  logic [PTR_W-1:0]       raddr,
  input  logic                   read_en,
  input  logic                   zero_supp,
  input  logic                   slow_mode,
  output logic [3:0][CODE_W-1:0] out_data,
  output logic [3:0]             out_strobe,
  output logic [1:0][CH_W-1:0]   bus_word,
  output logic                   node_a,
  output real                    vgn_a,
  output real                    vgn_b
);
  ch_word_t [1:0]     word;
  logic [N-1:0]       tap_a, tap_b;
  logic [2*CH_W-1:0]  rdata;

  tmc_channel #(.N(N), .CVG_PF(CVG_PF)) u_ch_a (
    .ref_clk(ref_clk), .rst_n(rst_n), .div4(div4), .tin(tin[0]),
    .tap(tap_a), .vgn(vgn_a), .word(word[0]));
  tmc_channel #(.N(N), .CVG_PF(CVG_PF)) u_ch_b (
    .ref_clk(ref_clk), .rst_n(rst_n), .div4(div4), .tin(tin[1]),
    .tap(tap_b), .vgn(vgn_b), .word(word[1]));

  assign node_a = tap_a[0];

  dual_port_mem #(.W(2 * CH_W), .DEPTH(NWORDS), .AW(PTR_W)) u_mem (
    .clk(pclk), .we(we), .waddr(waddr), .wdata(word), .raddr(raddr), .rdata(rdata));

  output_control u_oc (
    .clk(pclk), .rst_n(rst_n), .rdata(rdata), .read_en(read_en),
    .zero_supp(zero_supp), .slow_mode(slow_mode),
    .out_data(out_data), .out_strobe(out_strobe), .bus_word(bus_word));
endmodule
