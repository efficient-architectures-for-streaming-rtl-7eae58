// tb_hydra_ni: drives message words into the network interface and models
// the tile processor side here (a local-memory array, a done flag, a stream
// consumer and producer). Checks configuration writes, DMA writes and reads
// of the right memory, that the tile is held for the whole DMA, the one word
// per cycle rate (a 200-word DMA write takes 3 + 200 cycles), start and reset
// pulses, the completion word of NI_WAIT, the streaming input order and the
// forwarding of streaming output.
module tb_hydra_ni;
  import montium_pkg::*;
  logic clk = 0, rst;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  logic [15:0] rx_data, tx_data;
  logic cfg_we, dma_hold, dma_we, tp_start, tp_reset, tp_done;
  logic [15:0] cfg_addr, cfg_wdata;
  logic [3:0] dma_mem;
  logic [9:0] dma_addr;
  logic [15:0] dma_wdata, dma_rdata;
  logic in_valid, in_pop, out_ready, out_push;
  logic [15:0] in_data, out_data;
  int checks = 0, failures = 0;

  hydra_ni dut (.*);

  always #5 clk = ~clk;

  logic [15:0] mem [10][1024];
  logic [15:0] cfg_seen [int];
  int starts = 0, resets = 0, holds = 0, hold_max_run = 0, run = 0;
  int popped [$];

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  // Tile-processor side model.
  assign dma_rdata = mem[dma_mem][dma_addr];
  always @(posedge clk) begin
    if (dma_we) begin
      if (!dma_hold) begin failures++; $display("FAIL DMA write without hold"); end
      mem[dma_mem][dma_addr] <= dma_wdata;
    end
    if (cfg_we) cfg_seen[int'(cfg_addr)] = cfg_wdata;
    if (tp_start) starts++;
    if (tp_reset) resets++;
    if (in_valid && in_pop) popped.push_back(int'(in_data));
    run = dma_hold ? run + 1 : 0;
    if (dma_hold) holds++;
    if (run > hold_max_run) hold_max_run = run;
  end

  // Words sent by the NoC side, one per cycle when accepted.
  task automatic send(logic [15:0] w);
    @(negedge clk); rx_valid = 1; rx_data = w;
    @(posedge clk); while (!rx_ready) @(posedge clk);
    @(negedge clk); rx_valid = 0;
  endtask

  // Back-to-back burst: counts the cycles taken.
  task automatic burst(logic [15:0] w [], output int cycles);
    int i = 0;
    cycles = 0;
    @(negedge clk);
    while (i < w.size()) begin
      rx_valid = 1; rx_data = w[i];
      @(posedge clk); cycles++;
      if (rx_ready) i++;
      @(negedge clk);
    end
    rx_valid = 0;
  endtask

  task automatic recv(output logic [15:0] w);
    @(negedge clk); tx_ready = 1;
    @(posedge clk); while (!tx_valid) @(posedge clk);
    w = tx_data;
    @(negedge clk); tx_ready = 0;
  endtask

  logic [15:0] msg [];
  logic [15:0] r;
  int cyc;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; rx_valid = 0; rx_data = 0; tx_ready = 0; tp_done = 0; in_pop = 0;
    out_push = 0; out_data = 0;
    for (int m = 0; m < 10; m++) for (int a = 0; a < 1024; a++) mem[m][a] = 0;
    @(negedge clk); rst = 0;

    // configuration write of 4 words at 0x1003
    msg = new[7];
    msg[0] = {NI_CFG_WR, 4'h0, 8'h0}; msg[1] = 16'h1003; msg[2] = 16'd4;
    for (int i = 0; i < 4; i++) msg[3+i] = 16'hC000 + 16'(i);
    burst(msg, cyc);
    for (int i = 0; i < 4; i++) check("cfg word", int'(cfg_seen[32'h1003 + i]), 32'hC000 + i);
    check("cfg no hold", holds, 0);

    // 200-word DMA write into M03 at 100: the filter-coefficient case
    msg = new[203];
    msg[0] = {NI_MEM_WR, 4'd2, 8'h0}; msg[1] = 16'd100; msg[2] = 16'd200;
    for (int i = 0; i < 200; i++) msg[3+i] = 16'(i * 321 + 7);
    burst(msg, cyc);
    check("DMA write cycles", cyc, 203);
    check("hold covered the transfer", int'(hold_max_run >= 202), 1);
    @(negedge clk);
    check("hold released", int'(dma_hold), 0);
    for (int i = 0; i < 200; i++) check("M03 word", int'(mem[2][100+i]), (i * 321 + 7) & 16'hffff);
    check("other memory untouched", int'(mem[1][100]), 0);

    // DMA read of 5 words back from M03
    send({NI_MEM_RD, 4'd2, 8'h0}); send(16'd150); send(16'd5);
    for (int i = 0; i < 5; i++) begin
      #1 check("hold during read", int'(dma_hold), 1);
      recv(r); check("read word", int'(r), ((50 + i) * 321 + 7) & 16'hffff);
    end

    // start pulse, wait for done, reset pulse
    send({NI_START, 12'h0});
    check("start pulses", starts, 1);
    send({NI_WAIT, 12'h0});
    repeat (5) @(posedge clk);
    check("no reply before done", int'(tx_valid), 0);
    tp_done = 1;
    recv(r); check("done word", int'(r), int'(NI_DONE_WORD));
    send({NI_RESET, 12'h0});
    check("reset pulses", resets, 1);

    // streaming: 20 words in, consumed slowly by the tile
    fork
      begin
        send({NI_STREAM, 12'h0}); send(16'd20);
        for (int i = 0; i < 20; i++) send(16'h5000 + 16'(i));
      end
      begin
        while (popped.size() < 20) begin
          @(negedge clk); in_pop = ($urandom_range(0, 2) == 0);
        end
        @(negedge clk); in_pop = 0;
      end
    join
    for (int i = 0; i < 20; i++) check("stream in order", popped[i], 32'h5000 + i);

    // streaming output goes straight to tx
    @(negedge clk); out_push = 1; out_data = 16'hABCD; tx_ready = 1;
    #1 check("out ready", int'(out_ready), 1);
    check("tx valid", int'(tx_valid), 1);
    check("tx data", int'(tx_data), 32'hABCD);
    @(negedge clk); out_push = 0; tx_ready = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
