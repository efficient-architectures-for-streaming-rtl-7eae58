// tb_alu_regfile: random writes and reads of one ALU input register file,
// checked against a shadow copy; also checks that a write is not visible on
// the read port before the clock edge (no bypass) and that reset clears.
module tb_alu_regfile;
  logic clk = 0, rst, we;
  logic [1:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [4];
  int checks = 0, failures = 0;

  alu_regfile #(.DEPTH(4), .DW(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; waddr = 0; wdata = 0; raddr = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 4; i++) begin raddr = 2'(i); #1 check("reset", rdata, 16'h0); shadow[i] = 0; end
    for (int n = 0; n < 1000; n++) begin
      we = 1'($urandom); waddr = 2'($urandom); wdata = 16'($urandom); raddr = waddr;
      #1 check("before edge", rdata, shadow[raddr]);
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      raddr = 2'($urandom);
      #1 check("after edge", rdata, shadow[raddr]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
