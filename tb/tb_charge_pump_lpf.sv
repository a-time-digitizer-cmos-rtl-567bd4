// Self-checking test of charge_pump_lpf: charge delivered by UP and DN
// pulses (I*t/C on the capacitor), the resistor step while a pulse lasts,
// discharge by rst and the capacitor limit at VDD. Expected values are computed from
// the default 80 uA, 2 kOhm, 100 pF.
`timescale 1ns/1fs
module tb_charge_pump_lpf;
  logic up = 0, dn = 0, rst = 1;
  real vgn;
  int checks = 0, failures = 0;

  charge_pump_lpf dut (.*);

  task automatic near(input real got, input real expv, input string what);
    checks++;
    if (got < expv - 1.0e-4 || got > expv + 1.0e-4) begin
      failures++; $display("FAIL %s: %f exp %f", what, got, expv);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #5 rst = 0;
    #5 up = 1; #1;
    near(vgn, 0.4, "resistor step during UP");        // 64 uA * 6.25 kOhm
    #9 up = 0; #1;
    near(vgn, 0.0064, "after 10 ns UP");              // 64 uA * 10 ns / 100 pF
    dn = 1; #1;
    near(vgn, 0.0064 - 0.4, "resistor step during DN");
    #4 dn = 0; #1;
    near(vgn, 0.0032, "after 5 ns DN");
    up = 1; dn = 1; #3 up = 0; dn = 0; #1;
    near(vgn, 0.0032, "UP and DN together cancel");
    up = 1; #6000 up = 0; #1;
    near(vgn, 3.3, "limited to VDD");
    rst = 1; #1;
    near(vgn, 0.0, "reset discharges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
