// Self-checking test of the PLL model: from reset it must lock node A
// (tap 0) to the reference in frequency and phase. Cases: 40 MHz (lock
// time measured and required below 10 us), 10 MHz and 50 MHz (ends of
// the tracking range, lock within 20 us) and the x4 mode with a 10 MHz
// (oscillator at 40 MHz, 20 us) and a 2.5 MHz reference (oscillator at
// 10 MHz, the low end of the x4 clock range, 40 us). Lock: ten consecutive periods within 0.5 % of the target and
// rising edges of node A within 150 ps of the reference (x1 mode).
`timescale 1ns/1fs
module tb_pll;
  logic ref_clk = 0, rst_n = 0, div4 = 0;
  logic [31:0] tap;
  real vgn;
  real half_ns = 12.5;
  int checks = 0, failures = 0;
  realtime t_ref, t_a, t_a_prev;

  pll dut (.ref_clk(ref_clk), .rst_n(rst_n), .div4(div4), .tap(tap), .vgn(vgn));

  always begin #(half_ns) ref_clk = ~ref_clk; end
  always @(posedge ref_clk) t_ref = $realtime;
  always @(posedge tap[0]) begin t_a_prev = t_a; t_a = $realtime; end

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input real ref_mhz, input bit x4, input real max_lock_us);
    real target, per, ph;
    int good;
    realtime t_start, t_lock;
    rst_n = 0; div4 = x4; half_ns = 500.0 / ref_mhz;
    #200; @(posedge ref_clk); rst_n = 1; t_start = $realtime;
    target = x4 ? 2.0 * half_ns / 4.0 : 2.0 * half_ns;
    good = 0; t_lock = 0;
    while (good < 10 && $realtime - t_start < 20000.0) begin
      @(posedge tap[0]);
      per = t_a - t_a_prev;
      ph = t_a - t_ref;
      if (ph > half_ns) ph -= 2.0 * half_ns;
      if (ph < -half_ns) ph += 2.0 * half_ns;
      if (per > target * 0.995 && per < target * 1.005 && (x4 || (ph < 0.15 && ph > -0.15))) begin
        if (good == 0) t_lock = $realtime;
        good++;
      end else good = 0;
    end
    checks++;
    if (good < 10 || (t_lock - t_start) > max_lock_us * 1000.0) begin
      failures++; $display("FAIL lock at %0.1f MHz x4=%0d: good=%0d t=%0.2f us", ref_mhz, x4, good, (t_lock - t_start) / 1000.0);
    end else
      $display("locked at %0.1f MHz x4=%0d after %0.2f us, vgn=%0.3f V", ref_mhz, x4, (t_lock - t_start) / 1000.0, vgn);
    // stays locked
    repeat (200) @(posedge tap[0]);
    per = t_a - t_a_prev;
    checks++;
    if (per < target * 0.995 || per > target * 1.005) begin failures++; $display("FAIL drift %f", per); end
  endtask

  initial begin
    run(40.0, 0, 10.0);
    run(10.0, 0, 20.0);
    run(50.0, 0, 20.0);
    run(10.0, 1, 20.0);
    run(2.5, 1, 40.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
