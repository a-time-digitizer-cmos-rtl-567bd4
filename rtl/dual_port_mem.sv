// Dual-port memory used as a ring buffer: one write port addressed by the
// write pointer and one read port addressed by the read pointer, both on
// the same clock, so recording continues while triggered data are read.
// Default size 24 bits x 128 words (two channels of 12 bits). The read port
// is registered: rdata shows the word at raddr one clock later. A read of
// the word being written in the same cycle returns the old contents.
`timescale 1ns/1fs
module dual_port_mem #(
  parameter int W     = 24,
  parameter int DEPTH = 128,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
