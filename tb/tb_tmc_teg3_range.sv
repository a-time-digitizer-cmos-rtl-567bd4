// Time-range workload test of the four-channel digitizer at its default
// size (32 taps, 128-word ring buffers): the same record-and-read-back
// operation as the end-to-end test, run at the two ends of the clock range
// in x1 mode, 50 MHz (bins of 625 ps, 128 words = 2.56 us of history) and
// 10 MHz (bins of 3.125 ns, 128 words = 12.8 us). In each case the PLLs
// lock from reset, random edges are recorded at bin centres on all four
// channels, and the read pointer runs LAT = 124 words behind the writer,
// close to the full buffer depth; every word on the outputs is compared
// with the record expected at rd_addr, part of the run uses zero
// suppression, and each channel is then read through the 12-bit bus.
// The clock has rising edges at t_org + j*T; period p samples bit k at
// t_org + (p + 1/2 + (k + 1/2)/32)*T and is written at edge j = p + 2.
// The clock range and the 128-word depth follow the original chip; the
// latency and the stimulus are this test's own.
`timescale 1ns/1fs
module tb_tmc_teg3_range;
  import tmc_pkg::*;
  localparam int LAT = 124;
  real T = 20.0, t_org = 10.0;   // clock period and the time of edge 0

  logic clk = 0, rst_n = 0, div4_mode = 0;
  logic [3:0] tin = '0;
  logic [1:0] csr_addr = '0;
  logic csr_we = 0;
  logic [7:0] csr_wdata = '0, csr_rdata;
  logic write_ctrl = 0, read_en = 0, read_inc = 0;
  logic [6:0] rd_addr;
  logic [7:0][4:0] out_data;
  logic [7:0] out_strobe;
  logic [11:0] bus_data;
  logic [4:0] rx_diff;
  logic pclk;
  real vgn0, vgn1, vgn2, vgn3;

  int checks = 0, failures = 0;
  int n_ignored = 0, n_rise = 0, n_fall = 0, n_spare = 0, n_supp = 0, n_wrap = 0, n_bus = 0, n_words = 0;

  // expected records per channel and period, and per channel and address
  logic [11:0] exp_p [4][0:2047];
  logic [11:0] exp_a [4][0:127];
  bit          val_a [0:127];

  // recording state mirrored from the CSR writes
  bit  rec_on = 0, zs = 0, checking = 0;
  int  wptr = 0, p_first = 0;

  tmc_teg3 dut (.*);

  // clock on an absolute grid: rising edges at t_org + j * T
  initial begin
    real tr;
    forever begin
      tr = t_org;
      while (tr - $realtime < 0.01) tr = tr + T;
      #(tr - $realtime) clk = 1;
      #(T / 2.0) clk = 0;
    end
  end

  initial begin
    #600000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int edge_index(input realtime t);
    return int'((t - t_org) / T);
  endfunction

  task automatic csr_write(input logic [1:0] a, input logic [7:0] d);
    @(negedge pclk); csr_addr = a; csr_wdata = d; csr_we = 1;
    @(negedge pclk); csr_we = 0;
  endtask

  // Mirror of the memory writes: edge j writes the record of period j - 2.
  always @(posedge pclk) begin
    int j;
    j = edge_index($realtime);
    if (rec_on && rst_n) begin
      for (int c = 0; c < 4; c++) exp_a[c][wptr] = exp_p[c][(j - 2) % 2048];
      val_a[wptr] = (j - 2 >= p_first);
      if (wptr == 127) n_wrap++;
      wptr = (wptr + 1) % 128;
    end
  end

  // Output checker: the word on the outputs belongs to address rd_addr.
  always @(posedge pclk) begin
    #1;
    if (checking && val_a[rd_addr]) begin
      for (int c = 0; c < 4; c++) begin
        ch_word_t w;
        w = exp_a[c][rd_addr];
        checks += 2;
        if (out_data[2*c] !== w.rise.code || out_data[2*c+1] !== w.fall.code) begin
          failures++;
          $display("[%0t] FAIL ch%0d addr %0d data %0d/%0d exp %0d/%0d", $realtime, c, rd_addr, out_data[2*c], out_data[2*c+1], w.rise.code, w.fall.code);
        end
        if (out_strobe[2*c] !== (read_en && (!zs || w.rise.hit)) ||
            out_strobe[2*c+1] !== (read_en && (!zs || w.fall.hit))) begin
          failures++; $display("FAIL ch%0d addr %0d strobes %b%b", c, rd_addr, out_strobe[2*c], out_strobe[2*c+1]);
        end
        n_rise += w.rise.hit; n_fall += w.fall.hit;
        n_spare += !w.rise.hit + !w.fall.hit;
        if (zs) n_supp += !w.rise.hit + !w.fall.hit;
        
      end
      n_words++;
    end
  end

  // Random edges on all four channels for periods p0 .. p0+np-1.
  task automatic stimulate(input int p0, input int np);
    int a [4], b [4], c3 [4], kind [4];
    logic [3:0] lvl;
    for (int p = p0; p < p0 + np; p++) begin
      #((t_org + T * p + T / 2.0) - $realtime);
      lvl = tin;
      for (int c = 0; c < 4; c++) begin
        ch_word_t w;
        // kind 0: no edge, 1: one edge, 2-3: two edges, 4: three edges
        // (the third, repeating the first direction, must be ignored)
        kind[c] = $urandom_range(0, 4);
        a[c] = $urandom_range(0, 25);
        b[c] = $urandom_range(a[c] + 2, 28);
        c3[c] = $urandom_range(b[c] + 2, 31);
        if (kind[c] == 4) n_ignored++;
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
        #(((k == 0) ? 0.5 : 1.0) * T / 32.0);
        for (int c = 0; c < 4; c++)
          if ((kind[c] >= 1 && k == a[c]) || (kind[c] >= 2 && k == b[c]) || (kind[c] == 4 && k == c3[c]))
            tin[c] = !tin[c];
      end
    end
    // the inputs keep their last level afterwards
    for (int p = p0 + np; p < p0 + np + 400; p++)
      for (int c = 0; c < 4; c++) exp_p[c][p % 2048] = {1'b0, 4'b0, tin[c], 1'b0, 4'b0, !tin[c]};
  endtask

  // One complete operation in the current mode.
  task automatic run_mode(input int p_lock);
    int p_start;
    rst_n = 0; rec_on = 0; checking = 0; zs = 0; wptr = 0; tin = '0;
    for (int i = 0; i < 128; i++) val_a[i] = 0;
    for (int c = 0; c < 4; c++) for (int i = 0; i < 2048; i++) exp_p[c][i] = 12'b0_00000_0_00001;
    #200; rst_n = 1;
    // wait for the PLLs to lock
    #((t_org + T * p_lock) - $realtime);
    csr_write(CSR_RX, 8'h1F);
    csr_addr = CSR_RX; #1; checks++;
    if (csr_rdata !== 8'h1F || rx_diff !== 5'h1F) begin failures++; $display("FAIL rx register"); end
    csr_write(CSR_WPTR, 8'd0);
    csr_write(CSR_RPTR, 8'(-LAT));
    write_ctrl = 1; read_en = 1;
    p_first = edge_index($realtime) + 4;
    // CTRL: rec_en, rd_sync; the mirror starts with the first write edge
    @(negedge pclk); csr_addr = CSR_CTRL; csr_wdata = 8'b0000_0011; csr_we = 1;
    @(posedge pclk); #0.1 rec_on = 1;
    @(negedge pclk); csr_we = 0;
    p_start = edge_index($realtime) + 1;
    checking = 1;
    fork
      stimulate(p_start, 300);
      begin
        #((t_org + T * (p_start + 150)) - $realtime);
        // zero suppression from here on (rec_en, rd_sync kept)
        @(negedge pclk); csr_addr = CSR_CTRL; csr_wdata = 8'b0000_0111; csr_we = 1;
        @(posedge pclk); #2 zs = 1;   // the output registered at the next edge uses it
        @(negedge pclk); csr_we = 0;
      end
    join
    // let the last records reach the outputs
    repeat (LAT + 8) @(posedge pclk);
    checking = 0;
    // slow read-out: recording stops, one channel at a time on the bus
    for (int c = 0; c < 4; c++) begin
      @(negedge pclk); csr_addr = CSR_CTRL; csr_wdata = {2'b00, 2'(c), 4'b1001}; csr_we = 1;
      @(posedge pclk); #0.1 rec_on = 0;
      @(negedge pclk); csr_we = 0;
      csr_write(CSR_RPTR, 8'(wptr - 20));
      repeat (3) @(negedge pclk);
      for (int i = 0; i < 12; i++) begin
        read_inc = 1; @(negedge pclk);
        read_inc = 0; repeat (2) @(negedge pclk);
        checks++;
        if (bus_data !== exp_a[c][rd_addr] || out_strobe !== 8'h00) begin
          failures++; $display("[%0t] FAIL bus ch%0d addr %0d: %h exp %h", $realtime, c, rd_addr, bus_data, exp_a[c][rd_addr]);
        end
        n_bus++;
      end
      checks++;
      csr_addr = CSR_RPTR; #1;
      if (csr_rdata !== 8'((wptr - 20 + 12) % 128)) begin failures++; $display("FAIL read pointer after slow read-out %0d", csr_rdata); end
    end
  endtask

  initial begin
    int n_lo;
    // 50 MHz: lock for 20 us
    T = 20.0; t_org = 10.0;
    run_mode(1000);
    n_lo = n_words;
    // 10 MHz: a new clock grid starting after the first run
    T = 100.0; t_org = T * real'(int'($realtime / T) + 2);
    #100;
    run_mode(edge_index($realtime) + 200);
    checks++;
    if (n_ignored == 0 || n_rise == 0 || n_fall == 0 || n_spare == 0 || n_supp == 0 || n_wrap < 2 || n_bus == 0 ||
        n_lo == 0 || n_words == n_lo) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("ignored third edges=%0d", n_ignored);
    $display("words: 50 MHz %0d, 10 MHz %0d; rise hits=%0d fall hits=%0d spare=%0d suppressed=%0d wraps=%0d bus words=%0d",
             n_lo, n_words - n_lo, n_rise, n_fall, n_spare, n_supp, n_wrap, n_bus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
