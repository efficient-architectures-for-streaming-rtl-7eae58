// tb_local_memory: fills all 1024 words of one local memory with a pattern,
// reads them all back, then runs random simultaneous read/write traffic
// against a shadow array (a read of the word being written returns the old
// value).
module tb_local_memory;
  logic clk = 0, we;
  logic [9:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [1024];
  int checks = 0, failures = 0;

  local_memory #(.DEPTH(1024), .DW(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = 16'(i * 37 + 5); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1024; i++) begin
      raddr = 10'(i); #1 check("fill", rdata, 16'(i * 37 + 5));
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 10'($urandom); wdata = 16'($urandom);
      raddr = n[0] ? waddr : 10'($urandom);
      #1 check("read during write", rdata, shadow[raddr]);
      @(posedge clk); if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
