// End-to-end test of one channel (PLL, time memory cells, synchronizing
// stage, 33-bit latch, both encoders). The reference rises at 25p + 12.5 ns
// (40 MHz, or 10 MHz in x4 mode with the oscillator at 40 MHz); the
// conversion period p then starts at t0 = 25p + 25 ns and bit k samples at
// t0 + k * 0.78125 ns. After the PLL has locked, each period gets zero, one
// or two input edges placed in the middle of a bin, so an edge placed in bin
// N (between sample N and N+1) must be encoded as N. The word for period p
// is checked at 25p + 70 ns, inside its valid window. Counts how many
// rising hits, falling hits and spare codes were seen.
`timescale 1ns/1fs
module tb_tmc_channel;
  import tmc_pkg::*;
  localparam real T = 25.0, D = T / 32.0;
  logic ref_clk = 0, rst_n = 0, div4 = 0, tin = 0;
  logic [31:0] tap;
  real vgn;
  ch_word_t word;
  real ref_half = 12.5;
  int checks = 0, failures = 0, n_rise = 0, n_fall = 0, n_spare = 0;
  logic [5:0] exp_r [0:1023];
  logic [5:0] exp_f [0:1023];

  tmc_channel dut (.ref_clk(ref_clk), .rst_n(rst_n), .div4(div4), .tin(tin),
                   .tap(tap), .vgn(vgn), .word(word));

  // reference rising edges at 12.5 ns + k * (2 * ref_half), on an absolute grid
  initial begin
    real tr;
    tr = 12.5;
    forever begin
      #(tr - $realtime) ref_clk = 1;
      #(ref_half) ref_clk = 0;
      tr = tr + 2.0 * ref_half;
      while (tr - $realtime < ref_half) tr = tr + 2.0 * ref_half;
    end
  end

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Stimulus for periods p0..p0+np-1; the level at the start of a period is
  // the level left by the previous one.
  task automatic stimulate(input int p0, input int np);
    int a, b, kind;
    logic lvl;
    for (int p = p0; p < p0 + np; p++) begin
      #((25.0 * p + 25.0) - $realtime);   // t0 of period p
      lvl = tin;
      kind = $urandom_range(0, 3);
      a = $urandom_range(0, 29);
      b = $urandom_range(a + 2, 31);
      exp_r[p % 1024] = {1'b0, 4'b0, lvl};
      exp_f[p % 1024] = {1'b0, 4'b0, !lvl};
      if (kind >= 1) begin
        if (lvl) exp_f[p % 1024] = {1'b1, 5'(a)}; else exp_r[p % 1024] = {1'b1, 5'(a)};
      end
      if (kind >= 2) begin
        if (lvl) exp_r[p % 1024] = {1'b1, 5'(b)}; else exp_f[p % 1024] = {1'b1, 5'(b)};
      end
      if (kind >= 1) begin
        #((a + 0.5) * D); tin = !tin;
        if (kind >= 2) begin #((b - a) * D); tin = !tin; end
      end
    end
  endtask

  task automatic check_words(input int p0, input int np);
    for (int p = p0; p < p0 + np; p++) begin
      #((25.0 * p + 70.0) - $realtime);
      checks += 2;
      if (word.rise !== exp_r[p % 1024]) begin
        failures++; $display("FAIL p=%0d rise %b/%0d exp %b/%0d", p, word.rise.hit, word.rise.code, exp_r[p % 1024][5], exp_r[p % 1024][4:0]);
      end
      if (word.fall !== exp_f[p % 1024]) begin
        failures++; $display("FAIL p=%0d fall %b/%0d exp %b/%0d", p, word.fall.hit, word.fall.code, exp_f[p % 1024][5], exp_f[p % 1024][4:0]);
      end
      n_rise += word.rise.hit; n_fall += word.fall.hit;
      n_spare += !word.rise.hit + !word.fall.hit;
    end
  endtask

  initial begin
    // x1 mode: lock for 12 us, then 300 periods
    #100 rst_n = 1;
    fork
      stimulate(480, 300);
      check_words(480, 300);
    join
    // x4 mode: 10 MHz reference, relock, then 300 periods
    rst_n = 0; div4 = 1; ref_half = 50.0;
    #((25.0 * 800 + 12.5) - $realtime); rst_n = 1;   // reference edge at 12.5 ns + 100q
    fork
      stimulate(1300, 300);
      check_words(1300, 300);
    join
    checks++;
    if (n_rise < 100 || n_fall < 100 || n_spare < 100) begin
      failures++; $display("FAIL coverage rise=%0d fall=%0d spare=%0d", n_rise, n_fall, n_spare);
    end
    $display("rising hits=%0d falling hits=%0d spare codes=%0d", n_rise, n_fall, n_spare);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
