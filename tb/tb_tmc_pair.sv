// Test of one channel pair at 40 MHz: two channels with their PLLs, the
// shared 24-bit x 128-word memory and the output control. The testbench
// plays the pointer logic: it writes every clock at waddr and reads 40
// words behind it. After lock, random edges (bin centres) are applied to
// both channels; each word leaving the output control is compared with the
// record expected for its address, in normal and zero-suppressed mode,
// and the bus words are compared in slow mode.
// Timing model: clock rising at 25j + 12.5 ns, period p samples bit k at
// 25p + 25 + k*0.78125 ns and is written at edge j = p + 2; the output for
// the read address of edge j appears after edge j + 1.
`timescale 1ns/1fs
module tb_tmc_pair;
  import tmc_pkg::*;
  localparam real D = 25.0 / 32.0;
  localparam int LAG = 40;
  logic pclk = 0, rst_n = 0;
  logic [1:0] tin = '0;
  logic we = 0, read_en = 1, zero_supp = 0, slow_mode = 0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [3:0][4:0] out_data;
  logic [3:0] out_strobe;
  logic [1:0][11:0] bus_word;
  logic node_a;
  real vgn_a, vgn_b;
  int checks = 0, failures = 0, n_hits = 0, n_supp = 0, n_bus = 0;
  logic [11:0] exp_p [2][0:2047];
  logic [11:0] exp_a [2][0:127];
  int  per_a [0:127];
  int  p_first = 1 << 30;
  int  j = -1;
  logic [6:0] ra_q1 = 0;   // read address used at the previous edge

  tmc_pair dut (.pclk(pclk), .ref_clk(pclk), .rst_n(rst_n), .div4(1'b0), .tin(tin),
                .we(we), .waddr(waddr), .raddr(raddr), .read_en(read_en),
                .zero_supp(zero_supp), .slow_mode(slow_mode), .out_data(out_data),
                .out_strobe(out_strobe), .bus_word(bus_word), .node_a(node_a),
                .vgn_a(vgn_a), .vgn_b(vgn_b));

  initial begin
    #12.5;
    forever begin pclk = 1; #12.5; pclk = 0; #12.5; end
  end

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // pointer logic of the testbench and mirror of the memory
  always @(posedge pclk) begin
    j++;
    if (we) begin
      for (int c = 0; c < 2; c++) exp_a[c][waddr] = exp_p[c][(j - 2) % 2048];
      per_a[waddr] = j - 2;
    end
    // outputs now show the word read at edge j - 1
    #1;
    if (rst_n && per_a[ra_q1] >= p_first) begin
      for (int c = 0; c < 2; c++) begin
        ch_word_t w;
        w = exp_a[c][ra_q1];
        checks++;
        if (slow_mode) begin
          if (bus_word[c] !== w || out_strobe != 4'b0) begin
            failures++; $display("FAIL bus ch%0d addr %0d", c, ra_q1);
          end
          n_bus++;
        end else begin
          if (out_data[2*c] !== w.rise.code || out_data[2*c+1] !== w.fall.code ||
              out_strobe[2*c] !== (read_en && (!zero_supp || w.rise.hit)) ||
              out_strobe[2*c+1] !== (read_en && (!zero_supp || w.fall.hit))) begin
            failures++; $display("FAIL ch%0d addr %0d got %0d/%0d %b exp %h", c, ra_q1, out_data[2*c], out_data[2*c+1], out_strobe, w);
          end
          n_hits += w.rise.hit + w.fall.hit;
          if (zero_supp) n_supp += !w.rise.hit + !w.fall.hit;
        end
      end
    end
    ra_q1 = raddr;
    waddr = waddr + 7'(we);
    raddr = waddr - 7'(LAG);
  end

  task automatic stimulate(input int p0, input int np);
    int a [2], b [2], kind [2];
    logic [1:0] lvl;
    for (int p = p0; p < p0 + np; p++) begin
      #((25.0 * p + 25.0) - $realtime);
      lvl = tin;
      for (int c = 0; c < 2; c++) begin
        ch_word_t w;
        kind[c] = $urandom_range(0, 3);
        a[c] = $urandom_range(0, 29);
        b[c] = $urandom_range(a[c] + 2, 31);
        w.rise = {1'b0, 4'b0, lvl[c]};
        w.fall = {1'b0, 4'b0, !lvl[c]};
        if (kind[c] >= 1) begin
          if (lvl[c]) w.fall = {1'b1, 5'(a[c])}; else w.rise = {1'b1, 5'(a[c])};
        end
        if (kind[c] >= 2) begin
          if (lvl[c]) w.rise = {1'b1, 5'(b[c])}; else w.fall = {1'b1, 5'(b[c])};
        end
        exp_p[c][p % 2048] = w;
      end
      for (int k = 0; k < 32; k++) begin
        #(((k == 0) ? 0.5 : 1.0) * D);
        for (int c = 0; c < 2; c++)
          if ((kind[c] >= 1 && k == a[c]) || (kind[c] >= 2 && k == b[c])) tin[c] = !tin[c];
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 128; i++) per_a[i] = -1;
    #100 rst_n = 1;
    we = 1;
    p_first = 480;
    fork
      stimulate(480, 300);
      begin
        #(25.0 * 630); @(negedge pclk) zero_supp = 1;
        #(25.0 * 100); @(negedge pclk) slow_mode = 1;
      end
    join
    checks++;
    if (n_hits == 0 || n_supp == 0 || n_bus == 0) failures++;
    $display("hits=%0d suppressed=%0d bus=%0d", n_hits, n_supp, n_bus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
