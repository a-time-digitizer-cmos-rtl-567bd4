// Behavioural model of a conventional sequential phase-frequency detector.
// Two flip-flops are set by the rising edges of the reference and of the
// feedback clock; as soon as both are set they are cleared through a reset
// path with delay T_RST_NS (which sets the minimum pulse width). UP is
// therefore high for the time the reference leads, DN for the time the
// feedback leads, and a frequency difference keeps one side active most of
// the time. rst clears both. The reset delay is an own choice; it is
// modelled with a delayed assignment, hence a behavioural model.
`timescale 1ns/1fs
module pfd #(
  parameter real T_RST_NS = 0.1
) (
  input  logic ref_clk,
  input  logic fb_clk,
  input  logic rst,
  output logic up,
  output logic dn
);
  logic clr;

  assign #(T_RST_NS) clr = rst || (up && dn);

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge fb_clk or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end
endmodule
