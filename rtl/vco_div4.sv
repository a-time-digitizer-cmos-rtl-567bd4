// Optional divide-by-4 counter between the ring oscillator and the phase
// detector. With div4 = 0 the feedback is the oscillator itself and the
// oscillator locks to the clock frequency; with div4 = 1 a 2-bit counter
// divides it by four, so the oscillator runs at four times the clock.
// The feedback rises with the oscillator's rising edge in both modes.
// The option comes from the original chip; the counter is own design.
`timescale 1ns/1fs
module vco_div4 (
  input  logic vco,
  input  logic rst_n,
  input  logic div4,
  output logic fb
);
  logic [1:0] cnt;

  always_ff @(posedge vco or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  // cnt[1] rises on every fourth rising edge of vco
  assign fb = div4 ? cnt[1] : vco;
endmodule
