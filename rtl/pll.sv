// Behavioural model of the per-channel phase-locked loop.
// A sequential phase-frequency detector compares the reference clock with
// the feedback taken from node A (tap 0) of the asymmetric ring oscillator,
// directly or through the divide-by-4 counter; the charge pump and loop
// filter turn its pulses into the control voltage VGN, which sets the
// oscillator's stage delay. In lock the rising edge of node A coincides
// with the reference rising edge, tap k falls (k/N + 1/2) of a period after
// it, and the oscillator period is the reference period (div4 = 0) or a
// quarter of it (div4 = 1). rst_n low discharges the filter; the loop then
// re-acquires. The structure follows the original; the component values
// are own choices (see charge_pump_lpf and asym_ring_osc).
`timescale 1ns/1fs
module pll #(
  parameter int  N      = 32,
  parameter real CVG_PF = 100.0
) (
  input  logic         ref_clk,
  input  logic         rst_n,
  input  logic         div4,
  output logic [N-1:0] tap,
  output real          vgn
);
  logic up, dn, fb;

  pfd u_pfd (.ref_clk(ref_clk), .fb_clk(fb), .rst(!rst_n), .up(up), .dn(dn));

  charge_pump_lpf #(.CVG_PF(CVG_PF)) u_cp (.up(up), .dn(dn), .rst(!rst_n), .vgn(vgn));

  asym_ring_osc #(.N(N)) u_vco (.vgn(vgn), .en(1'b1), .tap(tap));

  vco_div4 u_div (.vco(tap[0]), .rst_n(rst_n), .div4(div4), .fb(fb));
endmodule
