// montium_tp: the reconfigurable tile processor.
//
// Five 16-bit ALUs, each fed by four private input register files (A..D) of
// four operands; ten local memories of 1024 x 16 bits, each with an address
// generation unit; a crossbar interconnect; a decoder of configurable
// instructions; and a sequencer that picks one decoder entry per cycle. The
// West output of ALU k+1 feeds the East input of ALU k (ALU5's East input is
// zero). These counts, widths and the neighbour link follow the source
// architecture; the one-instruction-per-cycle timing below is this design's.
//
// One executed instruction, in one clock cycle: each memory is read at its
// AGU's address; each ALU computes from the operands its register files
// currently show; the interconnect routes memory words, ALU results and the
// input-stream word; at the rising edge the selected register entries and
// memory words are written and the AGUs move. A value written into a register
// is therefore used by the ALU one cycle later.
//
// Network-interface side: cfg_* writes the configuration memory (sequencer
// program, decoder entries, AGU settings; map in montium_pkg). dma_hold halts
// the sequencer; while it is high dma_* reads (combinational dma_rdata) and
// writes (at the edge) one local-memory word per cycle. start/soft_reset/done
// control a computation. Streaming: in_valid/in_data/in_pop and
// out_ready/out_data/out_push, one word per cycle each.
module montium_tp
  import montium_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  // configuration memory
  input  logic            cfg_we,
  input  logic [15:0]     cfg_addr,
  input  logic [15:0]     cfg_wdata,
  // block-mode DMA
  input  logic            dma_hold,
  input  logic            dma_we,
  input  logic [3:0]      dma_mem,
  input  logic [AW-1:0]   dma_addr,
  input  logic [DW-1:0]   dma_wdata,
  output logic [DW-1:0]   dma_rdata,
  // computation control
  input  logic            start,
  input  logic            soft_reset,
  output logic            running,
  output logic            done,
  output logic            stall,
  // streaming mode
  input  logic            in_valid,
  input  logic [DW-1:0]   in_data,
  output logic            in_pop,
  input  logic            out_ready,
  output logic [DW-1:0]   out_data,
  output logic            out_push
);

  // ------------------------------------------------ configuration decode
  logic seq_cfg_we, dec_cfg_we;
  logic [N_MEM-1:0] agu_cfg_we;

  always_comb begin
    seq_cfg_we = cfg_we && (cfg_addr[15:12] == CFG_SEQ_BASE[15:12]) && (cfg_addr[11:9] == 3'd0);
    dec_cfg_we = cfg_we && (cfg_addr[15:12] == CFG_DEC_BASE[15:12]) && (cfg_addr[11:10] == 2'd0);
    for (int m = 0; m < N_MEM; m++)
      agu_cfg_we[m] = cfg_we && (cfg_addr[15:12] == CFG_AGU_BASE[15:12]) &&
                      (cfg_addr[11:2] == 10'(m));
  end

  // ---------------------------------------------------- control
  logic [4:0] dec_sel;
  logic       exec;
  ctl_t       ctl_raw, ctl;

  sequencer #(.DEPTH(SEQ_DEPTH)) u_seq (
    .clk, .rst,
    .cfg_we    (seq_cfg_we),
    .cfg_entry (cfg_addr[8:1]),
    .cfg_word  (cfg_addr[0]),
    .cfg_wdata,
    .start, .soft_reset,
    .hold      (dma_hold),
    .need_in   (ctl_raw.in_rd),
    .in_avail  (in_valid),
    .need_out  (ctl_raw.out_we),
    .out_space (out_ready),
    .dec_sel, .exec, .stall, .running, .done
  );

  instr_decoder #(.DEPTH(DEC_DEPTH)) u_dec (
    .clk, .rst,
    .cfg_we    (dec_cfg_we),
    .cfg_entry (cfg_addr[9:5]),
    .cfg_word  (cfg_addr[4:0]),
    .cfg_wdata,
    .sel       (dec_sel),
    .ctl       (ctl_raw)
  );

  // An instruction that does not execute has no effect.
  assign ctl = exec ? ctl_raw : '0;

  // ------------------------------------------------------ datapath
  logic [N_MEM-1:0][DW-1:0]        mem_rdata, mem_wdata;
  logic [N_MEM-1:0][AW-1:0]        agu_addr, mem_idx;
  logic [N_ALU-1:0][DW-1:0]        alu_out1, alu_out2, alu_west;
  logic [N_ALU*N_IN-1:0][DW-1:0]   reg_wdata, reg_rdata;

  tp_interconnect u_xbar (
    .ctl, .mem_rdata, .alu_out1, .alu_out2,
    .stream_in  (in_data),
    .reg_wdata, .mem_wdata, .mem_idx,
    .stream_out (out_data)
  );

  for (genvar m = 0; m < N_MEM; m++) begin : g_mem
    logic          we;
    logic [AW-1:0] wa, ra;
    logic [DW-1:0] wd;

    agu #(.AW(AW)) u_agu (
      .clk, .rst,
      .cfg_we    (agu_cfg_we[m]),
      .cfg_reg   (cfg_addr[1:0]),
      .cfg_wdata,
      .en        (exec),
      .cmd       (ctl.mem[m].agu),
      .load_idx  (mem_idx[m]),
      .addr      (agu_addr[m])
    );

    always_comb begin
      if (dma_hold) begin
        we = dma_we && (dma_mem == 4'(m));
        wa = dma_addr;
        ra = dma_addr;
        wd = dma_wdata;
      end else begin
        we = ctl.mem[m].we;
        wa = agu_addr[m];
        ra = agu_addr[m];
        wd = mem_wdata[m];
      end
    end

    local_memory #(.DEPTH(MEM_DEPTH), .DW(DW)) u_mem (
      .clk, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(mem_rdata[m])
    );
  end

  always_comb begin
    dma_rdata = '0;
    for (int m = 0; m < N_MEM; m++)
      if (dma_mem == 4'(m)) dma_rdata = mem_rdata[m];
  end

  for (genvar k = 0; k < N_ALU; k++) begin : g_alu
    for (genvar i = 0; i < N_IN; i++) begin : g_in
      logic [1:0] rsel;
      always_comb begin
        unique case (i)
          0: rsel = ctl.alu[k].rd_a;
          1: rsel = ctl.alu[k].rd_b;
          2: rsel = ctl.alu[k].rd_c;
          default: rsel = ctl.alu[k].rd_d;
        endcase
      end
      alu_regfile #(.DEPTH(N_REG), .DW(DW)) u_rf (
        .clk, .rst,
        .we    (ctl.regs[k*N_IN+i].we),
        .waddr (ctl.regs[k*N_IN+i].waddr),
        .wdata (reg_wdata[k*N_IN+i]),
        .raddr (rsel),
        .rdata (reg_rdata[k*N_IN+i])
      );
    end

    logic signed [DW-1:0] east;
    if (k == N_ALU-1) begin : g_edge
      assign east = '0;
    end else begin : g_link
      assign east = alu_west[k+1];
    end

    montium_alu u_alu (
      .op       (ctl_raw.alu[k].op),
      .fixp     (ctl_raw.alu[k].fixp),
      .use_east (ctl_raw.alu[k].use_east),
      .a        (reg_rdata[k*N_IN+0]),
      .b        (reg_rdata[k*N_IN+1]),
      .c        (reg_rdata[k*N_IN+2]),
      .d        (reg_rdata[k*N_IN+3]),
      .east     (east),
      .out1     (alu_out1[k]),
      .out2     (alu_out2[k]),
      .west     (alu_west[k])
    );
  end

  assign in_pop   = ctl.in_rd;
  assign out_push = ctl.out_we;

endmodule
