// tb_instr_decoder: writes random control words into every decoder entry one
// 16-bit word at a time, reads every entry back, then rewrites single words
// (partial reconfiguration) and checks only those words changed. Also checks
// that reset leaves all entries as no-operation (all zero) words.
module tb_instr_decoder;
  import montium_pkg::*;
  logic clk = 0, rst, cfg_we;
  logic [4:0] cfg_entry, cfg_word, sel;
  logic [15:0] cfg_wdata;
  ctl_t ctl;
  logic [CTL_WORDS*16-1:0] shadow [32];
  int checks = 0, failures = 0;

  instr_decoder #(.DEPTH(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int idx, ctl_t got, logic [CTL_WORDS*16-1:0] exp);
    checks++;
    if (got !== ctl_t'(exp[CTL_BITS-1:0])) begin
      failures++;
      if (failures < 10) $display("FAIL %s entry %0d", what, idx);
    end
  endtask

  task automatic wr(int e, int w, logic [15:0] v);
    @(negedge clk); cfg_we = 1; cfg_entry = 5'(e); cfg_word = 5'(w); cfg_wdata = v;
    shadow[e][16*w +: 16] = v;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; cfg_we = 0; cfg_entry = 0; cfg_word = 0; cfg_wdata = 0; sel = 0;
    @(negedge clk); rst = 0;
    for (int e = 0; e < 32; e++) begin shadow[e] = '0; sel = 5'(e); #1 check("reset", e, ctl, '0); end
    for (int e = 0; e < 32; e++)
      for (int w = 0; w < CTL_WORDS; w++) wr(e, w, 16'($urandom));
    for (int e = 0; e < 32; e++) begin sel = 5'(e); #1 check("full", e, ctl, shadow[e]); end
    for (int n = 0; n < 200; n++) begin
      wr($urandom_range(0, 31), $urandom_range(0, CTL_WORDS - 1), 16'($urandom));
      sel = 5'($urandom); #1 check("partial", int'(sel), ctl, shadow[sel]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
