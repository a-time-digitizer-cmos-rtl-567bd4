// Self-checking test of asym_ring_osc: at a control voltage set for a
// 781.25 ps stage delay the period is 25 ns (40 MHz), every tap k falls
// k * T/32 after tap 0 and rises half a period after its fall; a lower
// control voltage gives a longer period (10 MHz point checked). The
// control voltages follow from the model's delay law d = 600ps*2.6V/(VGN-0.7V).
`timescale 1ns/1fs
module tb_asym_ring_osc;
  real vgn;
  logic en = 1;
  logic [31:0] tap;
  realtime t_fall [32];
  realtime t_rise [32];
  int checks = 0, failures = 0;

  asym_ring_osc dut (.*);

  for (genvar k = 0; k < 32; k++) begin : g_mon
    always @(negedge tap[k]) t_fall[k] = $realtime;
    always @(posedge tap[k]) t_rise[k] = $realtime;
  end

  task automatic near(input real got, input real expv, input real tol, input string what);
    checks++;
    if (got < expv - tol || got > expv + tol) begin
      failures++; $display("FAIL %s: %f exp %f", what, got, expv);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    realtime t0, t1;
    vgn = 0.7 + 2.6 * 600.0 / 781.25;
    repeat (3) @(negedge tap[0]);
    t0 = $realtime;
    @(negedge tap[31]); #0.01;
    for (int k = 0; k < 32; k++) near(t_fall[k] - t0, k * 0.78125, 0.002, $sformatf("fall of tap %0d", k));
    @(negedge tap[0]);
    t1 = $realtime;
    near(t1 - t0, 25.0, 0.01, "period at 40 MHz setting");
    @(posedge tap[15]); #0.01;
    for (int k = 0; k < 16; k++) near(t_rise[k] - t_fall[k], 12.5, 0.01, $sformatf("half period of tap %0d", k));
    // 10 MHz: stage delay 3.125 ns
    vgn = 0.7 + 2.6 * 600.0 / 3125.0;
    repeat (2) @(negedge tap[0]);
    t0 = $realtime; @(negedge tap[0]);
    near($realtime - t0, 100.0, 0.05, "period at 10 MHz setting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
