// Self-checking test of latch33: data change between strobes must not
// reach q; q must follow d exactly at each tsync rising edge.
`timescale 1ns/1fs
module tb_latch33;
  logic tsync = 0;
  logic [32:0] d, q, exp_q;
  int checks = 0, failures = 0;

  latch33 dut (.tsync(tsync), .d(d), .q(q));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d = '0; #1 tsync = 1; #1 tsync = 0; exp_q = '0;
    for (int n = 0; n < 200; n++) begin
      d = {$urandom, $urandom} & 33'h1_FFFF_FFFF;
      #2; checks++;
      if (q !== exp_q) begin failures++; $display("FAIL q changed without tsync"); end
      tsync = 1; exp_q = d; #1;
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL q=%h exp %h", q, exp_q); end
      tsync = 0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
