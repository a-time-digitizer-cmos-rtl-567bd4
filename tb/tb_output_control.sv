// Self-checking test of output_control: random memory words in the three
// read-out modes (synchronous, zero-suppressed, slow); checks codes,
// strobes and bus words one clock after the input.
`timescale 1ns/1fs
module tb_output_control;
  import tmc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [23:0] rdata = 0;
  logic read_en = 0, zero_supp = 0, slow_mode = 0;
  logic [3:0][4:0] out_data;
  logic [3:0] out_strobe;
  logic [1:0][11:0] bus_word;
  int checks = 0, failures = 0, n_strobes = 0, n_supp = 0;

  output_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [23:0] w;
    logic [3:0] hits, exp_s;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      w = 24'($urandom);
      rdata = w; read_en = ($urandom_range(0, 4) != 0);
      zero_supp = (n >= 700); slow_mode = (n >= 1400);
      @(posedge clk); #1;
      // channel A rise = bits 11:6, fall = 5:0; channel B rise = 23:18, fall = 17:12
      hits = {w[17], w[23], w[5], w[11]};
      for (int i = 0; i < 4; i++) exp_s[i] = read_en && !slow_mode && (!zero_supp || hits[i]);
      checks += 3;
      if (out_data[0] !== w[10:6] || out_data[1] !== w[4:0] ||
          out_data[2] !== w[22:18] || out_data[3] !== w[16:12]) begin
        failures++; $display("FAIL data n=%0d", n);
      end
      if (out_strobe !== exp_s) begin failures++; $display("FAIL strobe n=%0d %b exp %b", n, out_strobe, exp_s); end
      if (bus_word[0] !== w[11:0] || bus_word[1] !== w[23:12]) begin failures++; $display("FAIL bus n=%0d", n); end
      n_strobes += $countones(out_strobe);
      if (zero_supp && read_en && !slow_mode) n_supp += 4 - $countones(out_strobe);
    end
    checks++;
    if (n_strobes == 0 || n_supp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
