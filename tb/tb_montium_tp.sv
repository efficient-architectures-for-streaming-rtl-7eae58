// tb_montium_tp: runs two programs on the tile processor through its
// configuration, DMA and stream ports.
//   1. A 16-tap Q15 FIR filter in streaming mode: 60 random samples arrive
//      with random gaps and the output side is randomly not ready, so the
//      sequencer stalls; every output is compared with the reference model,
//      and with the input always present the filter must take exactly
//      taps + 2 cycles per sample.
//   2. A block-mode product sum over 64 elements using ALU2's West output
//      into ALU1's East input; inputs are loaded by DMA with the tile held,
//      results read back by DMA and compared with the reference.
//   3. M06 as a sine lookup table: 40 indices streamed in, table words out.
module tb_montium_tp;
  import montium_pkg::*;
  import montium_progs_pkg::*;

  localparam int TAPS = 16, NS = 60, L = 64;

  logic clk = 0, rst;
  logic cfg_we, dma_hold, dma_we, start, soft_reset, running, done, stall;
  logic [15:0] cfg_addr, cfg_wdata, dma_wdata, dma_rdata;
  logic [3:0] dma_mem;
  logic [9:0] dma_addr;
  logic in_valid, in_pop, out_ready, out_push;
  logic [15:0] in_data, out_data;
  int checks = 0, failures = 0, stalls = 0;

  montium_tp dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (stall) stalls++;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  task automatic configure(cfg_list_t q);
    foreach (q[i]) begin
      @(negedge clk); cfg_we = 1; cfg_addr = 16'(q[i].addr); cfg_wdata = 16'(q[i].data);
    end
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic dma_wr(int m, int a, int v);
    @(negedge clk); dma_hold = 1; dma_we = 1; dma_mem = 4'(m); dma_addr = 10'(a); dma_wdata = 16'(v);
    @(negedge clk); dma_we = 0; dma_hold = 0;
  endtask

  task automatic dma_rd(int m, int a, output int v);
    @(negedge clk); dma_hold = 1; dma_mem = 4'(m); dma_addr = 10'(a);
    #1 v = int'(signed'(dma_rdata));
    @(negedge clk); dma_hold = 0;
  endtask

  int h [], x [NS], hist [], got [$], got_t [$], v, t0, t1;
  int pa [L], pb [L], pc [L], pd [L];
  bit gaps;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output side: random back-pressure while gaps is set.
  always @(negedge clk) out_ready <= gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
  always @(posedge clk) if (out_push && out_ready) begin
    got.push_back(int'(signed'(out_data)));
    got_t.push_back(int'($time));
  end

  initial begin
    rst = 1; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; dma_hold = 0; dma_we = 0; dma_mem = 0;
    dma_addr = 0; dma_wdata = 0; start = 0; soft_reset = 0; in_valid = 0; in_data = 0; gaps = 1;
    @(negedge clk); rst = 0;

    // ---------------- FIR, streaming mode
    h = new[TAPS]; hist = new[TAPS];
    foreach (h[j]) begin h[j] = $urandom_range(0, 16000) - 8000; hist[j] = 0; end
    foreach (x[i]) x[i] = $urandom_range(0, 65535) - 32768;
    configure(fir_config(TAPS));
    for (int j = 0; j < TAPS; j++) begin dma_wr(1, j, h[j]); dma_wr(0, j, 0); end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < NS; i++) begin
      if (i == NS / 2) begin
        gaps = 0;
        wait (got.size() == i);   // drain, then time an undisturbed stretch
      end
      if (gaps) repeat ($urandom_range(0, 30)) @(negedge clk);
      in_valid = 1; in_data = 16'(x[i]);
      @(posedge clk); while (!in_pop) @(posedge clk);
      @(negedge clk); in_valid = 0;
    end
    wait (got.size() == NS);
    t1 = $time;
    for (int i = 0; i < NS; i++) begin
      for (int j = TAPS - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = x[i];
      check($sformatf("fir y[%0d]", i), got[i], fir_ref(h, hist));
    end
    for (int i = NS / 2 + 1; i < NS; i++)
      check("cycles per sample", (got_t[i] - got_t[i-1]) / 10, TAPS + 2);
    check("stalls seen", int'(stalls > 0), 1);
    @(negedge clk); soft_reset = 1;
    @(negedge clk); soft_reset = 0;

    // ---------------- product sum, block mode
    for (int i = 0; i < L; i++) begin
      pa[i] = $urandom_range(0, 65535) - 32768; pb[i] = $urandom_range(0, 65535) - 32768;
      pc[i] = $urandom_range(0, 65535) - 32768; pd[i] = $urandom_range(0, 65535) - 32768;
      dma_wr(0, i, pa[i]); dma_wr(1, i, pb[i]); dma_wr(2, i, pc[i]); dma_wr(3, i, pd[i]);
    end
    configure(psum_config(L));
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = $time;
    wait (done);
    t1 = $time;
    check("psum cycles", (t1 - t0 + 5) / 10, L + 2);
    for (int i = 0; i < L; i++) begin
      dma_rd(4, i, v);
      check($sformatf("psum z[%0d]", i), v, sat16(q15mul(pa[i], pb[i]) + q15mul(pc[i], pd[i])));
    end
    @(negedge clk); soft_reset = 1;
    @(negedge clk); soft_reset = 0;

    // ---------------- sine lookup table in M06, streaming mode
    for (int i = 0; i < 1024; i++) dma_wr(5, i, sine_entry(i));
    configure(lut_config());
    got.delete(); got_t.delete();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < 40; i++) begin
      x[i] = (i < 4) ? i * 256 : $urandom_range(0, 1023);
      in_valid = 1; in_data = 16'(x[i]);
      @(posedge clk); while (!in_pop) @(posedge clk);
      @(negedge clk); in_valid = 0;
    end
    wait (got.size() == 40);
    for (int i = 0; i < 40; i++) check($sformatf("sin[%0d]", x[i]), got[i], sine_entry(x[i]));
    check("sin(pi/2) by hand", got[1], 32767);
    check("sin(pi) by hand", got[2], 0);
    check("sin(3pi/2) by hand", got[3], -32767);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
