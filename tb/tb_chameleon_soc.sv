// tb_chameleon_soc: end-to-end test of the tiled system at its default size
// (6 x 6 mesh, 4 Montium tiles, 200-tap FIR, 1024-entry table).
//
// A model of the central coordinating node (CCN) at node 0 turns network
// interface messages into packets (GT packets of up to 128 words, BE packets
// of up to 5 words) and sends them to the four Montium tiles, each running
// at its own clock:
//   tile 1 (GT): configure a 200-tap FIR, load coefficients, stream samples;
//   tile 2 (BE): load four vectors, run the product sum, WAIT, read back;
//   tile 3 (GT): load a 1024-entry sine table, stream 32 table lookups;
//   tile 4 (BE): product sum, then reset and reconfigure to a 16-tap FIR
//                while tile 1 is still busy, and stream samples.
// The messages of the four tiles are interleaved packet by packet, so the
// tiles are configured and run in parallel. Meanwhile nodes 5..35 exchange
// random BE packets. Checks every result word returned to the CCN, every
// background packet, and counts each mechanism: per-class packets both
// ways, GT-before-BE link decisions, stalls, DMA holds, starts, resets,
// WAIT replies, table lookups, overlapping tile activity, and configuration
// writes to one tile while another computes.
module tb_chameleon_soc;
  import montium_pkg::*;
  import montium_progs_pkg::*;
  import noc_pkg::*;

  localparam int X = 6, Y = 6, NN = X * Y, NT = 4;
  localparam int TAPS = 200, TAPS4 = 16, NS = 12, L = 64, NLUT = 32;

  logic noc_clk = 0, noc_rst;
  logic [NT-1:0] tile_clk = '0, tile_rst;
  logic  [NN-1:0]      ext_in_valid, ext_out_valid, gt_first;
  flit_t [NN-1:0]      ext_in_flit, ext_out_flit;
  logic  [NN-1:0][1:0] ext_in_ready, ext_out_ready;
  logic  [NT-1:0]      tp_running, tp_done, tp_stall;
  int checks = 0, failures = 0;

  chameleon_soc dut (.*);

  always #2   noc_clk     = ~noc_clk;
  always #3.5 tile_clk[0] = ~tile_clk[0];
  always #4.5 tile_clk[1] = ~tile_clk[1];
  always #2.5 tile_clk[2] = ~tile_clk[2];
  always #3   tile_clk[3] = ~tile_clk[3];

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  // ------------------------------------------------ mechanism counters
  int n_stall [NT], n_start [NT], n_reset [NT], n_hold [NT], n_lookup [NT];
  int max_running = 0, cfg_while_other_runs = 0, n_gtfirst = 0;

  for (genvar i = 0; i < NT; i++) begin : g_probe
    always @(posedge tile_clk[i]) if (!tile_rst[i]) begin
      if (tp_stall[i]) n_stall[i]++;
      if (dut.g_node[i+1].g_montium.u_tile.u_tp.start) n_start[i]++;
      if (dut.g_node[i+1].g_montium.u_tile.u_tp.soft_reset) n_reset[i]++;
      if (dut.g_node[i+1].g_montium.u_tile.u_tp.dma_hold) n_hold[i]++;
      if (dut.g_node[i+1].g_montium.u_tile.u_tp.ctl.mem[5].agu == AGU_LOAD) n_lookup[i]++;
    end
  end

  always @(posedge noc_clk) if (!noc_rst) begin
    int r;
    r = 0;
    for (int i = 0; i < NT; i++) if (tp_running[i]) r++;
    if (r > max_running) max_running = r;
    if (dut.g_node[4].g_montium.u_tile.u_tp.cfg_we && tp_running[0]) cfg_while_other_runs++;
    for (int n = 0; n < NN; n++) if (gt_first[n]) n_gtfirst++;
  end

  // ---------------------------------------------------------- injection
  flit_t txq [NN][$];
  int    bg_sent = 0, bg_got = 0, ccn_pkts_out [2];
  bit    bg_on = 0;

  always @(negedge noc_clk) begin
    for (int n = 0; n < NN; n++) begin
      ext_in_valid[n] <= (txq[n].size() > 0);
      ext_in_flit[n]  <= (txq[n].size() > 0) ? txq[n][0] : '0;
    end
    for (int n = 0; n < NN; n++)
      ext_out_ready[n] <= (n == 0) ? {2{$urandom_range(0, 3) != 0}} : 2'b11;
  end

  function automatic logic [15:0] bg_word(int src, int i);
    return 16'(src * 977 + i * 13 + 5);
  endfunction

  always @(posedge noc_clk) begin
    for (int n = 0; n < NN; n++)
      if (!noc_rst && txq[n].size() > 0 && ext_in_valid[n] && ext_in_ready[n][ext_in_flit[n].cls])
        void'(txq[n].pop_front());
    if (bg_on)
      for (int n = NT + 1; n < NN; n++)
        if (txq[n].size() < 12 && $urandom_range(0, 99) < 3) begin
          int d;
          flit_t f;
          d = $urandom_range(NT + 1, NN - 1);
          f.cls = BE; f.head = 1; f.tail = 0;
          f.data = head_data(4'(d % X), 4'(d / X), 4'(n % X), 4'(n / X));
          txq[n].push_back(f);
          for (int i = 0; i < 5; i++) begin
            f.head = 0; f.tail = (i == 4); f.data = bg_word(n, i);
            txq[n].push_back(f);
          end
          bg_sent++;
        end
  end

  // ------------------------------------------------ CCN message building
  // msgs[t]: the words of all messages for tile t; cls[t]: its class.
  int      msgs [NT][$];
  tclass_t tcls [NT];

  function automatic int hdr(ni_op_t op, int m = 0);
    return int'({op, 4'(m), 8'h0});
  endfunction

  function automatic void put(int t, int w);
    msgs[t].push_back(w);
  endfunction

  function automatic void configure(int t, cfg_list_t q);
    int i = 0, j;
    while (i < q.size()) begin
      j = i;
      while (j + 1 < q.size() && q[j+1].addr == q[j].addr + 1) j++;
      put(t, hdr(NI_CFG_WR)); put(t, q[i].addr); put(t, j - i + 1);
      for (int k = i; k <= j; k++) put(t, q[k].data);
      i = j + 1;
    end
  endfunction

  function automatic void dma_write(int t, int m, int v []);
    put(t, hdr(NI_MEM_WR, m)); put(t, 0); put(t, v.size());
    foreach (v[k]) put(t, v[k]);
  endfunction

  // Cut each tile's word list into packets and interleave the tiles'
  // packets into the CCN's injection queue.
  function automatic void packetize_all();
    bit more = 1;
    flit_t f;
    int len, n;
    while (more) begin
      more = 0;
      for (int t = 0; t < NT; t++) begin
        if (msgs[t].size() == 0) continue;
        more = 1;
        n = t + 1;
        len = (tcls[t] == GT) ? 128 : 5;
        if (len > msgs[t].size()) len = msgs[t].size();
        f.cls = tcls[t]; f.head = 1; f.tail = 0;
        f.data = head_data(4'(n % X), 4'(n / X), 4'd0, 4'd0);
        txq[0].push_back(f);
        for (int i = 0; i < len; i++) begin
          f.head = 0; f.tail = (i == len - 1); f.data = 16'(msgs[t].pop_front());
          txq[0].push_back(f);
        end
        ccn_pkts_out[int'(tcls[t])]++;
      end
    end
  endfunction

  // ------------------------------------------------------- CCN reception
  int rxq [NT][$];
  int rx_pkts [NT], rx_cls_pkts [2];
  bit in_pkt [NN][2];
  int cur_src [NN][2], bg_len [NN][2];

  always @(posedge noc_clk) if (!noc_rst) begin
    for (int n = 0; n < NN; n++) begin
      if (ext_out_valid[n] && ext_out_ready[n][ext_out_flit[n].cls]) begin
        flit_t f;
        int c;
        f = ext_out_flit[n];
        c = int'(f.cls);
        if (f.head) begin
          checks++;
          if (in_pkt[n][c] || int'(f.data[15:12]) != n % X || int'(f.data[11:8]) != n / X) begin
            failures++;
            $display("FAIL bad head at node %0d", n);
          end
          in_pkt[n][c]  = !f.tail;
          cur_src[n][c] = int'(f.data[3:0]) * X + int'(f.data[7:4]);
          bg_len[n][c]  = 0;
          if (n == 0) begin
            rx_pkts[cur_src[n][c] - 1]++;
            rx_cls_pkts[c]++;
          end
        end else begin
          if (n == 0) rxq[cur_src[n][c] - 1].push_back(int'(signed'(f.data)));
          else begin
            checks++;
            if (f.data != bg_word(cur_src[n][c], bg_len[n][c])) begin
              failures++;
              $display("FAIL background word at node %0d", n);
            end
            bg_len[n][c]++;
          end
          if (f.tail) begin
            in_pkt[n][c] = 0;
            if (n != 0) begin
              check("background packet length", bg_len[n][c], 5);
              bg_got++;
            end
          end
        end
      end
    end
  end

  task automatic wait_all(int n1, int n2, int n3, int n4);
    int k = 0;
    while ((rxq[0].size() < n1 || rxq[1].size() < n2 || rxq[2].size() < n3 || rxq[3].size() < n4)
           && k < 400000) begin
      @(posedge noc_clk);
      k++;
    end
  endtask

  // ------------------------------------------------------------ stimulus
  int h1 [], h4 [], z [], hist [], tab [], idx [];
  int x1 [NS], x4 [NS], y1 [NS], y4 [NS];
  int pa [NT][], pb [NT][], pc [NT][], pd [NT][];

  function automatic void fir_expect(int h [], int xs [NS], ref int ys [NS]);
    int hs [] = new[h.size()];
    foreach (hs[j]) hs[j] = 0;
    for (int i = 0; i < NS; i++) begin
      for (int j = h.size() - 1; j > 0; j--) hs[j] = hs[j-1];
      hs[0] = xs[i];
      ys[i] = fir_ref(h, hs);
    end
  endfunction

  function automatic void psum_messages(int t);
    pa[t] = new[L]; pb[t] = new[L]; pc[t] = new[L]; pd[t] = new[L];
    for (int i = 0; i < L; i++) begin
      pa[t][i] = $urandom_range(0, 65535) - 32768; pb[t][i] = $urandom_range(0, 65535) - 32768;
      pc[t][i] = $urandom_range(0, 65535) - 32768; pd[t][i] = $urandom_range(0, 65535) - 32768;
    end
    dma_write(t, 0, pa[t]); dma_write(t, 1, pb[t]); dma_write(t, 2, pc[t]); dma_write(t, 3, pd[t]);
    configure(t, psum_config(L));
    put(t, hdr(NI_START));
    put(t, hdr(NI_WAIT));
    put(t, hdr(NI_MEM_RD, 4)); put(t, 0); put(t, L);
  endfunction

  task automatic check_psum(int t);
    check($sformatf("tile %0d completion word", t + 1), rxq[t].pop_front() & 32'hffff, int'(NI_DONE_WORD));
    for (int i = 0; i < L; i++)
      check($sformatf("tile %0d z[%0d]", t + 1, i), rxq[t].pop_front(),
            sat16(q15mul(pa[t][i], pb[t][i]) + q15mul(pc[t][i], pd[t][i])));
  endtask

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    noc_rst = 1; tile_rst = '1; ext_in_valid = '0;
    foreach (in_pkt[n, c]) in_pkt[n][c] = 0;
    tcls[0] = GT; tcls[1] = BE; tcls[2] = GT; tcls[3] = BE;
    repeat (6) @(posedge noc_clk);
    @(negedge noc_clk); noc_rst = 0; tile_rst = '0;
    bg_on = 1;

    // tile 1: 200-tap FIR over GT
    h1 = new[TAPS]; z = new[TAPS];
    foreach (h1[j]) begin h1[j] = $urandom_range(0, 600) - 300; z[j] = 0; end
    foreach (x1[i]) x1[i] = $urandom_range(0, 65535) - 32768;
    fir_expect(h1, x1, y1);
    configure(0, fir_config(TAPS));
    dma_write(0, 1, h1);
    dma_write(0, 0, z);
    put(0, hdr(NI_START));
    put(0, hdr(NI_STREAM)); put(0, NS);
    foreach (x1[i]) put(0, x1[i]);

    // tile 2: product sum over BE
    psum_messages(1);

    // tile 3: sine table over GT
    tab = new[1024]; idx = new[NLUT];
    foreach (tab[i]) tab[i] = sine_entry(i);
    foreach (idx[i]) idx[i] = $urandom_range(0, 1023);
    dma_write(2, 5, tab);
    configure(2, lut_config());
    put(2, hdr(NI_START));
    put(2, hdr(NI_STREAM)); put(2, NLUT);
    foreach (idx[i]) put(2, idx[i]);

    // tile 4: product sum over BE, later reconfigured
    psum_messages(3);
    packetize_all();

    wait_all(0, 1 + L, 0, 1 + L);
    check_psum(1);
    check_psum(3);

    // Partial reconfiguration: only tile 4 changes, tile 1 keeps running.
    check("tile 1 still busy when tile 4 is reconfigured", int'(tp_running[0]), 1);
    h4 = new[TAPS4];
    foreach (h4[j]) h4[j] = $urandom_range(0, 20000) - 10000;
    foreach (x4[i]) x4[i] = $urandom_range(0, 65535) - 32768;
    fir_expect(h4, x4, y4);
    put(3, hdr(NI_RESET));
    configure(3, fir_config(TAPS4));
    dma_write(3, 1, h4);
    begin
      int z4 [] = new[TAPS4];
      foreach (z4[j]) z4[j] = 0;
      dma_write(3, 0, z4);
    end
    put(3, hdr(NI_START));
    put(3, hdr(NI_STREAM)); put(3, NS);
    foreach (x4[i]) put(3, x4[i]);
    packetize_all();

    wait_all(NS, 0, NLUT, NS);
    for (int i = 0; i < NS; i++) check($sformatf("tile 1 y[%0d]", i), rxq[0].pop_front(), y1[i]);
    for (int i = 0; i < NLUT; i++) check($sformatf("tile 3 sin[%0d]", idx[i]), rxq[2].pop_front(), tab[idx[i]]);
    for (int i = 0; i < NS; i++) check($sformatf("tile 4 y[%0d]", i), rxq[3].pop_front(), y4[i]);
    for (int t = 0; t < NT; t++) check($sformatf("tile %0d no extra words", t + 1), rxq[t].size(), 0);

    bg_on = 0;
    repeat (2000) @(posedge noc_clk);
    check("background packets delivered", bg_got, bg_sent);

    $display("CCN packets out BE=%0d GT=%0d, in BE=%0d GT=%0d; per tile in: %0d %0d %0d %0d",
             ccn_pkts_out[0], ccn_pkts_out[1], rx_cls_pkts[0], rx_cls_pkts[1],
             rx_pkts[0], rx_pkts[1], rx_pkts[2], rx_pkts[3]);
    $display("stalls %0d %0d %0d %0d, holds %0d %0d %0d %0d, starts %0d %0d %0d %0d, lookups %0d",
             n_stall[0], n_stall[1], n_stall[2], n_stall[3], n_hold[0], n_hold[1], n_hold[2], n_hold[3],
             n_start[0], n_start[1], n_start[2], n_start[3], n_lookup[2]);
    $display("max tiles running %0d, cfg writes to tile 4 while tile 1 runs %0d, gt_first %0d, background %0d",
             max_running, cfg_while_other_runs, n_gtfirst, bg_got);
    check("CCN sent GT packets", int'(ccn_pkts_out[1] > 0), 1);
    check("CCN sent BE packets", int'(ccn_pkts_out[0] > 0), 1);
    check("GT replies from tiles 1 and 3", int'(rx_cls_pkts[1] >= 2), 1);
    check("BE replies from tiles 2 and 4", int'(rx_cls_pkts[0] >= 2), 1);
    check("GT sent before waiting BE", int'(n_gtfirst > 0), 1);
    check("tile 1 stalled on input", int'(n_stall[0] > 0), 1);
    check("tile 2 DMA holds", int'(n_hold[1] > 4 * L), 1);
    check("starts tile 1", n_start[0], 1);
    check("starts tile 2", n_start[1], 1);
    check("starts tile 3", n_start[2], 1);
    check("starts tile 4", n_start[3], 2);
    check("reset tile 4 only", n_reset[3] + 10 * (n_reset[0] + n_reset[1] + n_reset[2]), 1);
    check("table lookups", n_lookup[2], NLUT);
    check("tiles computing at the same time", int'(max_running >= 2), 1);
    check("tile 4 configured while tile 1 computes", int'(cfg_while_other_runs > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
