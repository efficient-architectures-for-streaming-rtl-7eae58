// tb_agu: configures the address generator with random base, strides and
// length and issues random hold/step/step2/reset/load commands; the expected
// address is computed here as base + offset with offset kept modulo length;
// a load command sets the offset to the given table index.
// Also checks that en=0 freezes the address.
module tb_agu;
  import montium_pkg::*;
  logic clk = 0, rst, cfg_we, en;
  logic [1:0] cfg_reg;
  logic [15:0] cfg_wdata;
  agu_cmd_t cmd;
  logic [9:0] addr, load_idx;
  int checks = 0, failures = 0;
  int base, s1, s2, len, off;

  agu #(.AW(10)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  task automatic cfg(int r, int v);
    @(negedge clk); en = 0; cfg_we = 1; cfg_reg = 2'(r); cfg_wdata = 16'(v);
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; cfg_we = 0; en = 0; cmd = AGU_HOLD; cfg_reg = 0; cfg_wdata = 0; load_idx = 0;
    @(negedge clk); rst = 0;
    for (int t = 0; t < 20; t++) begin
      len  = (t == 0) ? 1024 : $urandom_range(1, 1024);
      base = $urandom_range(0, 1023);
      s1   = $urandom_range(0, len - 1);
      s2   = $urandom_range(0, len - 1);
      cfg(0, base); cfg(1, s1); cfg(2, s2); cfg(3, len == 1024 ? 0 : len);
      off = 0;
      #1 check("after cfg", addr, base);
      for (int n = 0; n < 500; n++) begin
        @(negedge clk);
        en  = ($urandom_range(0, 7) != 0);
        cmd = agu_cmd_t'($urandom_range(0, 4));
        load_idx = 10'($urandom_range(0, len - 1));
        @(posedge clk); #1;
        if (en) unique case (cmd)
          AGU_STEP:  off = (off + s1) % len;
          AGU_STEP2: off = (off + s2) % len;
          AGU_RESET: off = 0;
          AGU_LOAD:  off = int'(load_idx);
          default:   ;
        endcase
        check("addr", addr, (base + off) % 1024);
      end
    end
    // Walking a delay line backwards: length 8, stride 7 (= -1), from 0.
    cfg(0, 100); cfg(1, 7); cfg(2, 1); cfg(3, 8);
    @(negedge clk); en = 1; cmd = AGU_STEP;
    @(posedge clk); #1 check("backwards", addr, 107);
    @(posedge clk); #1 check("backwards", addr, 106);
    @(negedge clk); cmd = AGU_STEP2;
    @(posedge clk); #1 check("forward", addr, 107);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
