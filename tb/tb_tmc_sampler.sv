// Self-checking test of tmc_sampler with ideal taps (period 32 ns, tap k
// falling at k ns, rising 16 ns later). A random TIN waveform is applied;
// at the capture point (tap 8 falling of the next period) the 33 outputs
// must equal TIN at the 32 sampling instants and at the first instant of
// the next period (NB0). The reference reads a record of TIN kept by the
// testbench.
`timescale 1ns/1fs
module tb_tmc_sampler;
  localparam int N = 32;
  logic [N-1:0] tap = '1;
  logic tin = 0;
  logic [N:0] bits;
  logic hist [0:8191];  // TIN per 0.5 ns step, index = time*2
  int checks = 0, failures = 0;

  tmc_sampler dut (.tap(tap), .tin(tin), .bits(bits));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ideal taps: events at k ns + 0.25 ns, TIN changes only on whole 0.5 ns
  initial begin
    #0.25;
    forever for (int j = 0; j < N; j++) begin
      tap[j] = 1'b0;
      tap[(j + N/2) % N] = 1'b1;
      #1;
    end
  end

  initial begin
    for (int i = 0; i < 8192; i++) begin
      // pulses of random length, mostly several ns
      if ($urandom_range(0, 7) == 0) tin = ~tin;
      hist[i] = tin;
      #0.5;
    end
  end

  // capture point: tap 8 falls at 8.25 ns of each period
  initial begin
    logic [N:0] exp_b;
    int p0;
    #(32.0 + 8.25 + 0.1);
    for (int p = 0; p < 120; p++) begin
      // the period that started at p*32 + 0.25 ns
      p0 = p * 32;
      for (int k = 0; k < N; k++) exp_b[k] = hist[(p0 + k) * 2];
      exp_b[N] = hist[(p0 + 32) * 2];
      checks++;
      if (bits !== exp_b) begin
        failures++; $display("FAIL period %0d bits=%h exp %h", p, bits, exp_b);
      end
      #32;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
