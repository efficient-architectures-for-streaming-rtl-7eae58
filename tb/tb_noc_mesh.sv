// tb_noc_mesh: traffic test of the 6 x 6 mesh at its default size.
//
// Node 0 sends a guaranteed-throughput stream of 256-byte packets (128
// payload flits) to node 35, the far corner; every other node sends random
// 10-byte best-effort packets (5 payload flits) to random nodes. The run is
// done twice: GT stream alone, then GT stream under heavy BE load that
// crosses its path. Checks that every packet arrives once, complete, in
// order per source and class, with the expected length for its class; that
// the GT packets' latencies under BE load are exactly those without it
// (GT is never delayed by BE); and that GT flits overtook waiting BE flits.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int X = 6, Y = 6, NN = X * Y;
  localparam int GT_LEN = 128, BE_LEN = 5, N_GT = 6, GT_PERIOD = 300;

  logic clk = 0, rst;
  logic  [NN-1:0]      loc_in_valid, loc_out_valid, gt_first;
  flit_t [NN-1:0]      loc_in_flit, loc_out_flit;
  logic  [NN-1:0][1:0] loc_in_ready, loc_out_ready;
  int checks = 0, failures = 0;

  noc_mesh #(.X(X), .Y(Y)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  // ----------------------------------------------------------- injection
  flit_t txq [NN][$];
  int    sent_seq [NN][2];
  int    cycle = 0;
  int    gt_inject_time [$];
  bit    be_on = 0;

  function automatic logic [15:0] payload(int src, int seq, int i);
    return 16'((src * 7919 + seq * 104729 + i * 31) ^ (i << 9));
  endfunction

  task automatic enqueue(int src, int dst, tclass_t c);
    int len = (c == GT) ? GT_LEN : BE_LEN;
    int seq = sent_seq[src][c];
    flit_t f;
    f.cls = c; f.head = 1; f.tail = 0;
    f.data = head_data(4'(dst % X), 4'(dst / X), 4'(src % X), 4'(src / X));
    txq[src].push_back(f);
    for (int i = 0; i < len; i++) begin
      f.head = 0; f.tail = (i == len - 1);
      f.data = (i == 0) ? 16'(seq) : payload(src, seq, i);
      txq[src].push_back(f);
    end
    sent_seq[src][c]++;
  endtask

  always @(negedge clk) begin
    for (int n = 0; n < NN; n++) begin
      loc_in_valid[n] <= (txq[n].size() > 0);
      loc_in_flit[n]  <= (txq[n].size() > 0) ? txq[n][0] : '0;
    end
  end

  always @(posedge clk) begin
    cycle++;
    for (int n = 0; n < NN; n++)
      if (!rst && txq[n].size() > 0 && loc_in_valid[n] && loc_in_ready[n][loc_in_flit[n].cls]) begin
        if (n == 0 && loc_in_flit[n].head) gt_inject_time.push_back(cycle);
        void'(txq[n].pop_front());
      end
    // BE traffic generators
    if (be_on)
      for (int n = 1; n < NN; n++)
        if (txq[n].size() < 12 && $urandom_range(0, 99) < 8)
          enqueue(n, $urandom_range(0, NN - 1), BE);
  end

  // ------------------------------------------------------------ reception
  int rx_len [NN][2], rx_src [NN][2], rx_seq [NN][2];
  int exp_seq [NN][NN][2];
  int got_pkts [2], gt_lat [$], gtf_count = 0;
  bit in_pkt [NN][2];

  assign loc_out_ready = '1;

  always @(posedge clk) begin
    if (!rst) begin
      for (int n = 0; n < NN; n++) if (gt_first[n]) gtf_count++;
      for (int n = 0; n < NN; n++) begin
        if (loc_out_valid[n]) begin
          flit_t f;
          int c;
          f = loc_out_flit[n];
          c = int'(f.cls);
          if (f.head) begin
            checks++;
            if (in_pkt[n][c]) begin failures++; $display("FAIL head inside packet at node %0d", n); end
            if (int'(f.data[15:12]) != n % X || int'(f.data[11:8]) != n / X) begin
              failures++; $display("FAIL packet for (%0d,%0d) delivered to node %0d", f.data[15:12], f.data[11:8], n);
            end
            in_pkt[n][c] = 1; rx_len[n][c] = 0;
            rx_src[n][c] = int'(f.data[3:0]) * X + int'(f.data[7:4]);
          end else begin
            if (!in_pkt[n][c]) begin failures++; $display("FAIL payload without head at node %0d", n); end
            if (rx_len[n][c] == 0) begin
              rx_seq[n][c] = int'(f.data);
              // sequence numbers count per source, so per (source, destination)
              // they must rise but may skip
              check("order per source and class", int'(rx_seq[n][c] >= exp_seq[rx_src[n][c]][n][c]), 1);
              exp_seq[rx_src[n][c]][n][c] = rx_seq[n][c] + 1;
            end else if (f.data != payload(rx_src[n][c], rx_seq[n][c], rx_len[n][c])) begin
              failures++;
              if (failures < 10) $display("FAIL payload word at node %0d", n);
            end
            rx_len[n][c]++;
            if (f.tail) begin
              check("packet length", rx_len[n][c], (c == 1) ? GT_LEN : BE_LEN);
              in_pkt[n][c] = 0;
              got_pkts[c]++;
              if (c == 1) gt_lat.push_back(cycle - gt_inject_time[gt_lat.size()]);
            end
          end
        end
      end
    end
  end

  int lat_alone [$], be_sent;

  task automatic gt_phase();
    for (int k = 0; k < N_GT; k++) begin
      enqueue(0, NN - 1, GT);
      repeat (GT_PERIOD) @(posedge clk);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1;
    loc_in_valid = '0;
    foreach (sent_seq[n, c]) sent_seq[n][c] = 0;
    foreach (exp_seq[a, b, c]) exp_seq[a][b][c] = 0;
    foreach (in_pkt[n, c]) in_pkt[n][c] = 0;
    got_pkts[0] = 0; got_pkts[1] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // phase 1: GT alone
    gt_phase();
    lat_alone = gt_lat;
    gt_lat.delete(); gt_inject_time.delete();
    // phase 2: GT under BE load
    be_on = 1;
    repeat (500) @(posedge clk);
    gt_phase();
    be_on = 0;
    repeat (3000) @(posedge clk);
    check("GT packets delivered", got_pkts[1], 2 * N_GT);
    for (int k = 0; k < N_GT; k++)
      check($sformatf("GT latency of packet %0d under BE load", k), gt_lat[k], lat_alone[k]);
    be_sent = 0;
    for (int n = 1; n < NN; n++) be_sent += sent_seq[n][0];
    check("BE packets delivered", got_pkts[0], be_sent);
    check("GT overtook BE", int'(gtf_count > 0), 1);
    $display("GT latency alone %0d cycles, BE packets %0d, GT-first events %0d", lat_alone[0], be_sent, gtf_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
