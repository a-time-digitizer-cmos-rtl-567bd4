// Self-checking test of edge_encoder (both polarities): the encoding table
// rows (idle level, other level without an edge, edge at 0, edge at 31
// through NB0, several edges) and random 33-bit patterns, checked against
// a reference that isolates the lowest set bit of the edge mask.
`timescale 1ns/1fs
module tb_edge_encoder;
  import tmc_pkg::*;
  logic [32:0] bits;
  logic rhit, fhit;
  logic [4:0] rcode, fcode;
  int checks = 0, failures = 0;

  edge_encoder #(.RISING(1'b1)) u_r (.bits(bits), .hit(rhit), .code(rcode));
  edge_encoder #(.RISING(1'b0)) u_f (.bits(bits), .hit(fhit), .code(fcode));

  function automatic logic [5:0] ref_enc(input logic [32:0] b, input bit rising);
    logic [31:0] mask;
    mask = rising ? (~b[31:0] & b[32:1]) : (b[31:0] & ~b[32:1]);
    if (mask == 0) return {1'b0, 4'b0, rising ? b[0] : ~b[0]};
    for (int i = 0; i < 32; i++) if (mask == (32'(1) << i) || ((mask & ((32'(1) << i) - 1)) == 0 && mask[i]))
      return {1'b1, 5'(i)};
    return '0;
  endfunction

  task automatic check(input logic [32:0] b);
    logic [5:0] er, ef;
    bits = b;
    #1;
    er = ref_enc(b, 1'b1);
    ef = ref_enc(b, 1'b0);
    checks += 2;
    if ({rhit, rcode} !== er) begin
      failures++; $display("FAIL rising bits=%h got %b/%0d exp %b/%0d", b, rhit, rcode, er[5], er[4:0]);
    end
    if ({fhit, fcode} !== ef) begin
      failures++; $display("FAIL falling bits=%h got %b/%0d exp %b/%0d", b, fhit, fcode, ef[5], ef[4:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Table rows, written out by hand.
    check('0);                       // all 0: rise 0/0, fall hit 0 code 1
    bits = '0; #1; checks++; if ({rhit, rcode} != 6'b0_00000 || {fhit, fcode} != 6'b0_00001) failures++;
    bits = '1; #1; checks++; if ({rhit, rcode} != 6'b0_00001 || {fhit, fcode} != 6'b0_00000) failures++;
    bits = 33'h1_FFFF_FFFE; #1; checks++; if ({rhit, rcode} != 6'b1_00000) failures++;        // edge 0:1
    bits = 33'h1_0000_0000; #1; checks++; if ({rhit, rcode} != 6'b1_11111 || {fhit, fcode} != 6'b0_00001) failures++; // NB0 only
    bits = 33'h0_FFFF_FFFF; #1; checks++; if ({fhit, fcode} != 6'b1_11111) failures++;        // fall 31:NB0
    bits = 33'h0_0000_0FF0; #1; checks++; if ({rhit, rcode} != 6'b1_00011 || {fhit, fcode} != 6'b1_01011) failures++; // pulse
    bits = 33'h0_00F0_0F00; #1; checks++; if ({rhit, rcode} != 6'b1_00111) failures++;        // first of two rises
    for (int n = 0; n < 32; n++) check(~(33'(1) << n) & ((33'h1_FFFF_FFFF) << n)); // single rise at n-1:n
    for (int n = 0; n < 3000; n++) check({$urandom, $urandom} & 33'h1_FFFF_FFFF);
    for (int n = 0; n < 3000; n++) begin
      // at most two transitions, the common case of a real signal
      int a = $urandom_range(0, 33), b = $urandom_range(0, 33);
      logic [32:0] v = '0;
      for (int i = 0; i < 33; i++) v[i] = (i >= a && i < b);
      check($urandom_range(0, 1) ? v : ~v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
