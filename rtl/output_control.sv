// Output control of one channel pair.
// Takes the 24-bit word read from the pair's memory (channel A in bits
// 11:0, channel B in 23:12) and drives four outputs, each a 5-bit code with
// a strobe: 0 = A rising, 1 = A falling, 2 = B rising, 3 = B falling.
// In the normal synchronous mode every word read while read_en is high is
// strobed; in zero-suppression mode only outputs whose hit tag is set are
// strobed, so only non-zero data are sent. In slow read-out mode the strobes
// are off and the two 12-bit channel words are offered to the 12-bit bus.
// All outputs are registered: one clock after rdata.
// The three read-out modes come from the original chip; the output order,
// the registering and the strobe rule in normal mode are own choices.
`timescale 1ns/1fs
module output_control
  import tmc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [2*CH_W-1:0]     rdata,
  input  logic                  read_en,
  input  logic                  zero_supp,
  input  logic                  slow_mode,
  output logic [3:0][CODE_W-1:0] out_data,
  output logic [3:0]            out_strobe,
  output logic [1:0][CH_W-1:0]  bus_word
);
  ch_word_t [1:0] w;
  enc_t     [3:0] e;

  assign w = rdata;
  assign e = {w[1].fall, w[1].rise, w[0].fall, w[0].rise};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data   <= '0;
      out_strobe <= '0;
      bus_word   <= '0;
    end else begin
      for (int i = 0; i < 4; i++) begin
        out_data[i]   <= e[i].code;
        out_strobe[i] <= read_en && !slow_mode && (!zero_supp || e[i].hit);
      end
      bus_word <= rdata;
    end
  end
endmodule
