// Self-checking test of pfd: UP pulse width equals the lead of the
// reference, DN pulse width the lead of the feedback; with the feedback at
// a lower frequency UP is active most of the time.
`timescale 1ns/1fs
module tb_pfd;
  logic ref_clk = 0, fb_clk = 0, rst = 1, up, dn;
  int checks = 0, failures = 0;
  realtime t_up, t_dn, w;

  pfd dut (.*);

  always @(posedge up) t_up = $realtime;
  always @(posedge dn) t_dn = $realtime;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real up_time;
    #10 rst = 0;
    // reference leads by 3 ns
    for (int i = 0; i < 5; i++) begin
      #10 ref_clk = 1; #3 fb_clk = 1; #0.5;
      checks += 2;
      if (up !== 1'b0 || dn !== 1'b0) failures++;
      if ($realtime - t_up < 3.0 || $realtime - t_up > 3.5) failures++;
      #5 ref_clk = 0; fb_clk = 0;
    end
    // feedback leads by 2 ns
    for (int i = 0; i < 5; i++) begin
      #10 fb_clk = 1; #1; checks++; if (dn !== 1'b1 || up !== 1'b0) failures++;
      #1 ref_clk = 1; #0.5;
      checks++; if (up !== 1'b0 || dn !== 1'b0) failures++;
      #5 ref_clk = 0; fb_clk = 0;
    end
    // frequency difference: ref 40 MHz, fb 20 MHz, UP high most of the time
    up_time = 0;
    fork
      repeat (40) begin #12.5 ref_clk = ~ref_clk; end
      repeat (20) begin #25 fb_clk = ~fb_clk; end
      repeat (500) begin #1 if (up) up_time += 1; end
    join
    checks++;
    if (up_time < 250.0) begin failures++; $display("FAIL up time %f", up_time); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
