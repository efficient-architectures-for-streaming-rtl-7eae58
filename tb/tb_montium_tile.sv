// tb_montium_tile: end-to-end test of one tile through its NoC port, with the
// tile at its default sizes and the NoC and tile clocks unrelated (4 ns and
// 7 ns). Everything is done with network-interface messages:
//   1. configure a 200-tap Q15 FIR filter, DMA its coefficients into M02 and
//      clear the delay line in M01 (block mode, tile held), start it and
//      stream 12 samples through it (streaming mode); outputs must match the
//      reference model;
//   2. partial reconfiguration: reset the tile, replace only the 200
//      coefficients (3200 bits) by DMA, restart, stream 12 more samples;
//   3. load a block-mode product-sum program (ALU2 West -> ALU1 East) over
//      64 elements, DMA its inputs, start, wait for the completion word and
//      read the 64 results back by DMA;
//   4. load a 1024-word sine table into M06 (the size of the FFT twiddle
//      reload) and use it as a lookup table for 32 streamed indices.
// Checks the data, the DMA rate (one word per tile cycle: counting the cycles
// in which the tile is held and a message word is waiting, a 200-word load
// takes 202 and a 1024-word load 1026, address and count words included) and
// counts how
// often each mechanism occurred: tile stalls on the stream, DMA holds,
// stream words, completion replies, resets, transmit back-pressure, table
// lookups.
module tb_montium_tile;
  import montium_pkg::*;
  import montium_progs_pkg::*;

  localparam int TAPS = 200, NS = 12, L = 64;

  logic noc_clk = 0, tile_clk = 0, noc_rst, tile_rst;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  logic [15:0] rx_data, tx_data;
  logic tp_running, tp_done, tp_stall;
  int checks = 0, failures = 0;
  int n_stall = 0, n_hold_runs = 0, hold_run = 0, max_hold_run = 0, n_stream = 0;
  int n_wait = 0, n_reset = 0, n_rx = 0, n_tx = 0, n_start = 0, n_txfull = 0, n_lookup = 0;
  int busy_runs [$];

  montium_tile dut (.*);

  always #2 noc_clk  = ~noc_clk;
  always #3.5 tile_clk = ~tile_clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  // Mechanism counters, sampled on the tile clock.
  always @(posedge tile_clk) begin
    if (tp_stall) n_stall++;
    // DMA busy: the tile is held and a message word is waiting for it.
    if (dut.u_tp.dma_hold && dut.nrx_valid) hold_run++;
    if (!dut.u_tp.dma_hold) begin
      if (hold_run > 0) n_hold_runs++;
      if (hold_run > max_hold_run) max_hold_run = hold_run;
      if (hold_run > 0) busy_runs.push_back(hold_run);
      hold_run = 0;
    end
    if (dut.u_tp.in_pop) n_stream++;
    if (dut.u_tp.soft_reset) n_reset++;
    if (dut.u_tp.start) n_start++;
    if (dut.ntx_valid && !dut.ntx_ready) n_txfull++;
    if (dut.u_tp.ctl.mem[5].agu == AGU_LOAD) n_lookup++;
  end

  // NoC side: everything the tile sends is collected here.
  int rxq [$];
  bit slow_noc = 0;   // NoC side accepts only one word in four
  always @(negedge noc_clk) tx_ready <= slow_noc ? ($urandom_range(0, 3) == 0) : 1'($urandom);
  always @(posedge noc_clk) if (!noc_rst && tx_valid && tx_ready) begin
    rxq.push_back(int'(signed'(tx_data)));
    n_tx++;
  end

  function automatic int hdr(ni_op_t op, int m = 0);
    return int'({op, 4'(m), 8'h0});
  endfunction

  // One word per NoC cycle when called back to back (called at a falling edge).
  task automatic send(int w);
    if (noc_clk) @(negedge noc_clk);
    rx_valid = 1; rx_data = 16'(w);
    @(posedge noc_clk); while (!rx_ready) @(posedge noc_clk);
    n_rx++;
    @(negedge noc_clk); rx_valid = 0;
  endtask

  // Configuration: one CFG_WR message per run of consecutive addresses.
  task automatic configure(cfg_list_t q);
    int i = 0, j;
    while (i < q.size()) begin
      j = i;
      while (j + 1 < q.size() && q[j+1].addr == q[j].addr + 1) j++;
      send(hdr(NI_CFG_WR)); send(q[i].addr); send(j - i + 1);
      for (int k = i; k <= j; k++) send(q[k].data);
      i = j + 1;
    end
  endtask

  task automatic dma_write(int m, int a, int v []);
    send(hdr(NI_MEM_WR, m)); send(a); send(v.size());
    foreach (v[k]) send(v[k]);
  endtask

  task automatic wait_words(int n);
    int k = 0;
    while (rxq.size() < n && k < 200000) begin
      @(posedge noc_clk);
      k++;
    end
  endtask

  int h [], zeros [], hist [], x, exp_y, w;
  int pa [], pb [], pc [], pd [];

  task automatic run_fir(int first);
    foreach (hist[j]) hist[j] = 0;
    send(hdr(NI_START));
    send(hdr(NI_STREAM)); send(NS);
    for (int i = 0; i < NS; i++) begin
      x = $urandom_range(0, 65535) - 32768;
      for (int j = TAPS - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = x;
      exp_y = fir_ref(h, hist);
      send(x);
      wait_words(1);
      w = rxq.pop_front();
      check($sformatf("run %0d y[%0d]", first, i), w, exp_y);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    noc_rst = 1; tile_rst = 1; rx_valid = 0; rx_data = 0;
    repeat (4) @(posedge tile_clk);
    @(negedge noc_clk); noc_rst = 0; tile_rst = 0;

    // ------------------------------------------------ 1. FIR, first set
    h = new[TAPS]; zeros = new[TAPS]; hist = new[TAPS];
    foreach (h[j]) begin h[j] = $urandom_range(0, 600) - 300; zeros[j] = 0; end
    configure(fir_config(TAPS));
    dma_write(1, 0, h);
    dma_write(0, 0, zeros);
    run_fir(1);
    check("stream outputs only", rxq.size(), 0);

    // ------------------------------------ 2. new coefficients only
    send(hdr(NI_RESET));
    foreach (h[j]) h[j] = $urandom_range(0, 600) - 300;
    dma_write(1, 0, h);
    dma_write(0, 0, zeros);
    run_fir(2);

    // --------------------------------------- 3. block-mode product sum
    send(hdr(NI_RESET));
    pa = new[L]; pb = new[L]; pc = new[L]; pd = new[L];
    foreach (pa[i]) begin
      pa[i] = $urandom_range(0, 65535) - 32768; pb[i] = $urandom_range(0, 65535) - 32768;
      pc[i] = $urandom_range(0, 65535) - 32768; pd[i] = $urandom_range(0, 65535) - 32768;
    end
    dma_write(0, 0, pa); dma_write(1, 0, pb); dma_write(2, 0, pc); dma_write(3, 0, pd);
    configure(psum_config(L));
    send(hdr(NI_START));
    send(hdr(NI_WAIT));
    wait_words(1);
    w = rxq.pop_front(); n_wait++;
    check("completion word", w & 32'hffff, int'(NI_DONE_WORD));
    slow_noc = 1;
    send(hdr(NI_MEM_RD, 4)); send(0); send(L);
    wait_words(L);
    slow_noc = 0;
    for (int i = 0; i < L; i++)
      check($sformatf("psum z[%0d]", i), rxq.pop_front(), sat16(q15mul(pa[i], pb[i]) + q15mul(pc[i], pd[i])));

    // ------------------------------- 4. sine lookup table in M06
    send(hdr(NI_RESET));
    begin
      int tab [] = new[1024];
      int idx;
      foreach (tab[i]) tab[i] = sine_entry(i);
      dma_write(5, 0, tab);
      configure(lut_config());
      send(hdr(NI_START));
      send(hdr(NI_STREAM)); send(32);
      for (int i = 0; i < 32; i++) begin
        idx = $urandom_range(0, 1023);
        send(idx);
        wait_words(1);
        check($sformatf("sin[%0d]", idx), rxq.pop_front(), tab[idx]);
      end
    end

    // ---------------------------------------------------- mechanisms
    // DMA busy cycles (tile held, a word waiting): header words + data words.
    check("200-word DMA busy cycles", busy_runs[0], 202);
    check("1024-word DMA busy cycles (twiddle-table size)", busy_runs[busy_runs.size() - 1], 1026);
    $display("mechanisms: stalls=%0d dma_holds=%0d stream_words=%0d waits=%0d resets=%0d starts=%0d noc_in=%0d noc_out=%0d tx_full=%0d lookups=%0d",
             n_stall, n_hold_runs, n_stream, n_wait, n_reset, n_start, n_rx, n_tx, n_txfull, n_lookup);
    check("stall happened", int'(n_stall > 0), 1);
    check("transmit back-pressure happened", int'(n_txfull > 0), 1);
    check("DMA hold happened", int'(n_hold_runs >= 9), 1);
    check("stream words consumed", n_stream, 2 * NS + 32);
    check("wait reply happened", n_wait, 1);
    check("resets", n_reset, 3);
    check("starts", n_start, 4);
    check("table lookups", n_lookup, 32);
    check("words out of the tile", n_tx, 2 * NS + 1 + L + 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
