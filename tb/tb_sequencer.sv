// tb_sequencer: loads a program with two nested loops, a jump and a halt,
// runs it under random hold and random stream availability, and follows it
// with an interpreter of the instruction set written here. Checks the
// decoder entry presented each cycle, the stall and exec outputs, the total
// number of executed instructions (16, counted by hand), done after HALT, a
// restart, and soft reset.
module tb_sequencer;
  import montium_pkg::*;
  logic clk = 0, rst, cfg_we, cfg_word, start, soft_reset, hold;
  logic need_in, in_avail, need_out, out_space;
  logic [7:0] cfg_entry;
  logic [15:0] cfg_wdata;
  logic [4:0] dec_sel;
  logic exec, stall, running, done;
  int checks = 0, failures = 0;

  sequencer #(.DEPTH(256)) dut (.*);

  always #5 clk = ~clk;

  seq_instr_t prog [8];
  int pc, cnt [2], executed, stalls, holds;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d (pc=%0d)", what, got, exp, pc);
    end
  endtask

  function automatic seq_instr_t mk(seq_flow_t f, bit c, int imm, int dec);
    seq_instr_t i;
    i.flow = f; i.cnt_sel = c; i.imm = 10'(imm); i.dec = 5'(dec);
    return i;
  endfunction

  task automatic run_program(int expect_exec);
    executed = 0; pc = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (1) begin
      hold      = ($urandom_range(0, 4) == 0);
      in_avail  = 1'($urandom);
      out_space = 1'($urandom);
      need_in   = (dec_sel == 5'd5);
      need_out  = (dec_sel == 5'd6);
      #1;
      check("running", int'(running), 1);
      check("dec_sel", int'(dec_sel), int'(prog[pc].dec));
      check("stall", int'(stall), int'(!hold && ((need_in && !in_avail) || (need_out && !out_space))));
      check("exec", int'(exec), int'(!hold && !stall));
      if (hold) holds++;
      if (stall) stalls++;
      @(posedge clk);
      if (exec) begin
        executed++;
        unique case (prog[pc].flow)
          SQ_NEXT:   pc++;
          SQ_JUMP:   pc = int'(prog[pc].imm);
          SQ_LOOP:   if (cnt[prog[pc].cnt_sel] > 1) begin cnt[prog[pc].cnt_sel]--; pc = int'(prog[pc].imm); end
                     else begin cnt[prog[pc].cnt_sel] = 0; pc++; end
          SQ_SETCNT: begin cnt[prog[pc].cnt_sel] = int'(prog[pc].imm); pc++; end
          default:   pc = -1;
        endcase
      end
      @(negedge clk);
      if (pc < 0) break;
    end
    check("done", int'(done), 1);
    check("running after halt", int'(running), 0);
    check("instructions executed", executed, expect_exec);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; cfg_we = 0; cfg_word = 0; cfg_entry = 0; cfg_wdata = 0; start = 0; soft_reset = 0;
    hold = 0; need_in = 0; in_avail = 0; need_out = 0; out_space = 0;
    prog[0] = mk(SQ_SETCNT, 0, 3, 1);
    prog[1] = mk(SQ_SETCNT, 1, 2, 2);
    prog[2] = mk(SQ_LOOP,   1, 2, 3);
    prog[3] = mk(SQ_LOOP,   0, 1, 4);
    prog[4] = mk(SQ_NEXT,   0, 0, 5);
    prog[5] = mk(SQ_JUMP,   0, 7, 6);
    prog[6] = mk(SQ_NEXT,   0, 0, 31);
    prog[7] = mk(SQ_HALT,   0, 0, 7);
    @(negedge clk); rst = 0;
    check("idle after reset", int'(running) + int'(done), 0);
    for (int e = 0; e < 8; e++)
      for (int w = 0; w < SEQ_WORDS; w++) begin
        @(negedge clk); cfg_we = 1; cfg_entry = 8'(e); cfg_word = w[0];
        cfg_wdata = 16'(32'(prog[e]) >> (16 * w));
      end
    @(negedge clk); cfg_we = 0;
    cnt[0] = 0; cnt[1] = 0;
    run_program(16);
    run_program(16);           // restart after done
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; soft_reset = 1;
    @(negedge clk); soft_reset = 0;
    #1 check("soft reset", int'(running) + int'(done), 0);
    check("hold seen", int'(holds > 0), 1);
    check("stall seen", int'(stalls > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
