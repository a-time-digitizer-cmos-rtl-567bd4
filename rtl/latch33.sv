// 33-bit register between the synchronizing stage and the edge encoders.
// It captures B0..B31 and NB0 on the rising edge of tsync, a strobe placed
// in the part of the period where all 33 inputs are stable, and holds them
// for a full period so the encoders have a steady input. The original is a
// latch; an edge-triggered register is used here.
`timescale 1ns/1fs
module latch33 #(
  parameter int W = 33
) (
  input  logic         tsync,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge tsync) q <= d;
endmodule
