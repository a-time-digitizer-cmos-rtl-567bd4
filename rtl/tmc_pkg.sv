// Shared types and constants of the four-channel time digitizer.
// A channel samples its input at NTAP equally spaced instants per clock
// period; each clock cycle of samples is reduced by two edge encoders to a
// rising-edge and a falling-edge record of one hit tag plus a 5-bit position.
// The two records of one channel make a 12-bit memory word, and two channels
// share one 24-bit word of the dual-port memory (following the chip's
// block diagram). The CSR bit assignment is this design's own choice.
`timescale 1ns/1fs
package tmc_pkg;
  localparam int NTAP   = 32;              // timing taps per clock period
  localparam int CODE_W = $clog2(NTAP);    // 5-bit edge position
  localparam int DEPTH  = 128;             // ring buffer depth in words
  localparam int AW     = $clog2(DEPTH);   // 7-bit pointers
  localparam int CSR_W  = 8;               // CSR data width (own choice)

  // One edge record: hit tag and position (or spare code when hit = 0).
  typedef struct packed {
    logic              hit;
    logic [CODE_W-1:0] code;
  } enc_t;

  // Memory word of one channel: 12 bits.
  typedef struct packed {
    enc_t rise;
    enc_t fall;
  } ch_word_t;

  localparam int CH_W = $bits(ch_word_t);

  // CSR addresses.
  typedef enum logic [1:0] {
    CSR_CTRL = 2'd0,   // control bits, see ctrl_t
    CSR_WPTR = 2'd1,   // write pointer (load / read back)
    CSR_RPTR = 2'd2,   // read pointer (load / read back)
    CSR_RX   = 2'd3    // receiver modes
  } csr_addr_e;

  // CSR 0 layout, LSB first: rec_en, rd_sync, zero_supp, slow_mode, slow_ch[1:0].
  typedef struct packed {
    logic [1:0] spare;
    logic [1:0] slow_ch;    // channel placed on the 12-bit bus
    logic       slow_mode;  // slow read-out: writing stopped, 12-bit bus active
    logic       zero_supp;  // strobe only words whose hit tag is set
    logic       rd_sync;    // read pointer advances every clock (else on read_inc)
    logic       rec_en;     // recording enabled
  } ctrl_t;
endpackage
