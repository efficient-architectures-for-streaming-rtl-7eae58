// tb_tp_interconnect: random source selections for every destination of the
// crossbar with random source values; the expected value of each destination
// is looked up here from the source numbering (memories 0..9, ALU k OUT1/OUT2
// at 10+2k/11+2k, stream 20, zero 21).
module tb_tp_interconnect;
  import montium_pkg::*;
  ctl_t ctl;
  logic [N_MEM-1:0][DW-1:0] mem_rdata, mem_wdata;
  logic [N_ALU-1:0][DW-1:0] alu_out1, alu_out2;
  logic [DW-1:0] stream_in, stream_out;
  logic [N_MEM-1:0][AW-1:0] mem_idx;
  logic [N_ALU*N_IN-1:0][DW-1:0] reg_wdata;
  int checks = 0, failures = 0;

  tp_interconnect dut (.*);

  function automatic logic [15:0] expect_src(int s);
    if (s < 10)  return mem_rdata[s];
    if (s < 20)  return ((s - 10) % 2 == 0) ? alu_out1[(s - 10) / 2] : alu_out2[(s - 10) / 2];
    if (s == 20) return stream_in;
    return 16'h0;
  endfunction

  task automatic check(string what, int idx, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s[%0d] got=%h exp=%h", what, idx, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      ctl = '0;
      for (int r = 0; r < N_ALU*N_IN; r++) ctl.regs[r].src = src_t'($urandom_range(0, N_SRC - 1));
      for (int m = 0; m < N_MEM; m++) begin
        ctl.mem[m].src     = src_t'($urandom_range(0, N_SRC - 1));
        ctl.mem[m].idx_src = src_t'($urandom_range(0, N_SRC - 1));
      end
      ctl.out_src = src_t'($urandom_range(0, N_SRC - 1));
      for (int m = 0; m < N_MEM; m++) mem_rdata[m] = 16'($urandom);
      for (int k = 0; k < N_ALU; k++) begin alu_out1[k] = 16'($urandom); alu_out2[k] = 16'($urandom); end
      stream_in = 16'($urandom);
      #1;
      for (int r = 0; r < N_ALU*N_IN; r++) check("reg", r, reg_wdata[r], expect_src(int'(ctl.regs[r].src)));
      for (int m = 0; m < N_MEM; m++) begin
        check("mem", m, mem_wdata[m], expect_src(int'(ctl.mem[m].src)));
        check("idx", m, 16'(mem_idx[m]), expect_src(int'(ctl.mem[m].idx_src)) & 16'h3ff);
      end
      check("out", 0, stream_out, expect_src(int'(ctl.out_src)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
