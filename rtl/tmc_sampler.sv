// Time memory cells and synchronizing stage of one channel.
// Each of the NTAP first latches captures the measured signal TIN on the
// falling edge of its ring-oscillator tap; tap k falls k*T/NTAP after tap 0,
// so the latches hold TIN at NTAP equally spaced instants of one period T.
// The captured value is available at once as PASS. Half a period later, on
// the rising edge of tap 0 (node A), the lower half B0..B(N/2-1) is copied to
// BIT so that it survives the next sampling round. The upper half is used
// directly from PASS, and PASS of cell 0 is NB0, bit 0 of the next period.
// All N+1 outputs are stable for the first half of the next period, where
// the following register (latch33) captures them.
// The transmission-gate latches of the original cell are modelled as
// edge-triggered flip-flops; which bits use BIT and which PASS follows the
// original chip.
`timescale 1ns/1fs
module tmc_sampler
  import tmc_pkg::*;
#(
  parameter int N = NTAP
) (
  input  logic [N-1:0] tap,   // ring taps; falling edge = sampling instant
  input  logic         tin,   // measured signal
  output logic [N:0]   bits   // {NB0, B(N-1)..B0}
);
  logic [N-1:0]   pass_q;     // first latch (PASS outputs)
  logic [N/2-1:0] bit_q;      // synchronizing stage (BIT outputs)

  for (genvar k = 0; k < N; k++) begin : g_cell
    logic q;
    always_ff @(negedge tap[k]) q <= tin;
    assign pass_q[k] = q;
  end

  always_ff @(posedge tap[0]) bit_q <= pass_q[N/2-1:0];

  assign bits = {pass_q[0], pass_q[N-1:N/2], bit_q};
endmodule
