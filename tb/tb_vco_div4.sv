// Self-checking test of vco_div4: counts feedback rising edges against
// oscillator rising edges in both modes.
`timescale 1ns/1fs
module tb_vco_div4;
  logic vco = 0, rst_n = 0, div4 = 0, fb;
  int checks = 0, failures = 0, n_vco = 0, n_fb = 0;

  vco_div4 dut (.*);

  always #3 vco = ~vco;
  always @(posedge vco) n_vco++;
  always @(posedge fb) n_fb++;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #20 rst_n = 1;
    @(negedge vco); n_vco = 0; n_fb = 0;
    repeat (40) @(negedge vco);
    checks++; if (n_fb != n_vco) begin failures++; $display("FAIL x1 %0d %0d", n_fb, n_vco); end
    div4 = 1;
    repeat (4) @(negedge vco);
    n_vco = 0; n_fb = 0;
    repeat (400) @(negedge vco);
    checks++; if (n_fb != n_vco / 4) begin failures++; $display("FAIL x4 %0d %0d", n_fb, n_vco); end
    // fb rises only together with a vco rising edge
    for (int i = 0; i < 20; i++) begin
      @(posedge fb); checks++; if (vco !== 1'b1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
