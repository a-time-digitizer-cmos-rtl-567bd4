// Edge encoder: finds the first rising (RISING=1) or falling (RISING=0)
// transition in the 33 sampled bits B0..B31, NB0 of one clock period and
// encodes its position. A transition between bit N and bit N+1 (bit 32 is
// NB0, the first sample of the next period) gives hit = 1 and code = N;
// later transitions in the same period are ignored. Without such a
// transition the hit tag is 0 and the code is a spare: 0 when the signal
// stayed at its idle level (all 0 for the rising encoder, all 1 for the
// falling encoder) and 1 otherwise. This is the encoding table of the
// original chip. Purely combinational; the priority search is written as a
// downward loop so that the lowest N wins.
`timescale 1ns/1fs
module edge_encoder
  import tmc_pkg::*;
#(
  parameter bit RISING = 1'b1,
  parameter int N      = NTAP
) (
  input  logic [N:0]         bits,   // B0..B(N-1), bit N = NB0
  output logic               hit,
  output logic [CODE_W-1:0]  code
);
  always_comb begin
    hit  = 1'b0;
    // Spare code: 0 when bit 0 is at the idle level, 1 otherwise.
    code = RISING ? CODE_W'(bits[0]) : CODE_W'(!bits[0]);
    for (int i = N - 1; i >= 0; i--) begin
      if (RISING ? (!bits[i] && bits[i+1]) : (bits[i] && !bits[i+1])) begin
        hit  = 1'b1;
        code = CODE_W'(i);
      end
    end
  end
endmodule
