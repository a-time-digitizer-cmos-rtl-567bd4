// One measurement channel of the time digitizer.
// Its PLL locks an asymmetric ring oscillator to the reference clock so
// that the N taps divide each period into N equal bins (N = 32: 781 ps at
// 40 MHz). The time memory cells sample TIN at those instants, the
// synchronizing stage lines the N samples up with NB0 (the first sample of
// the following period), and latch33 captures all N+1 bits on tsync, the
// falling edge of tap TSYNC_TAP in the following period. Two edge encoders
// reduce the bits to a rising-edge and a falling-edge record.
// Timing (locked, div4 = 0, reference rising edge at time 0 of period n):
// bit k samples TIN at n + 1/2 + k/N periods; word is valid from
// n + 1 + 1/2 + TSYNC_TAP/N and is meant to be taken by the rising clock
// edge at n + 2. The chain PLL - TMC - sync stage - 33-bit latch - two
// encoders follows the original; the placement of tsync is own choice.
`timescale 1ns/1fs
module tmc_channel
  import tmc_pkg::*;
#(
  parameter int  N         = NTAP,
  parameter int  TSYNC_TAP = N / 4,
  parameter real CVG_PF    = 100.0
) (
  input  logic         ref_clk,
  input  logic         rst_n,
  input  logic         div4,
  input  logic         tin,
  output logic [N-1:0] tap,
  output real          vgn,
  output ch_word_t     word
);
  logic [N:0] bits, bits_q;
  logic       tsync;

  pll #(.N(N), .CVG_PF(CVG_PF)) u_pll (
    .ref_clk(ref_clk), .rst_n(rst_n), .div4(div4), .tap(tap), .vgn(vgn));

  tmc_sampler #(.N(N)) u_tmc (.tap(tap), .tin(tin), .bits(bits));

  assign tsync = !tap[TSYNC_TAP];

  latch33 #(.W(N + 1)) u_latch (.tsync(tsync), .d(bits), .q(bits_q));

  edge_encoder #(.RISING(1'b1), .N(N)) u_renc (
    .bits(bits_q), .hit(word.rise.hit), .code(word.rise.code));
  edge_encoder #(.RISING(1'b0), .N(N)) u_fenc (
    .bits(bits_q), .hit(word.fall.hit), .code(word.fall.code));
endmodule
