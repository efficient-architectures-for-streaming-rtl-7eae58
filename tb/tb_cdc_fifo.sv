// tb_cdc_fifo: sends 3000 numbered words from a 7 ns clock domain to a 3 ns
// domain and 3000 more in the other direction relation (slow reader), with
// random valid and ready; checks order, no loss and no duplication, and that
// the FIFO was seen both full and empty.
module tb_cdc_fifo;
  logic wclk = 0, rclk = 0, wrst, rrst;
  logic w_valid, w_ready, r_valid, r_ready;
  logic [15:0] w_data, r_data;
  int checks = 0, failures = 0, sent = 0, got = 0, fulls = 0, empties = 0;
  int wper = 7, rper = 3;

  cdc_fifo #(.DEPTH(8), .DW(16)) dut (.*);

  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  task automatic check(string what, int g, int e);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, g, e);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  always @(posedge wclk) begin
    if (!wrst) begin
      if (w_valid && w_ready) sent++;
      if (!w_ready) fulls++;
    end
  end
  always @(negedge wclk) begin
    w_valid <= !wrst && (sent < 6000) && ($urandom_range(0, 3) != 0);
    w_data  <= 16'(sent * 13 + 1);
  end

  // reader
  always @(posedge rclk) begin
    if (!rrst) begin
      if (r_valid && r_ready) begin
        check("word", int'(r_data), (got * 13 + 1) & 16'hffff);
        got++;
      end
      if (!r_valid) empties++;
    end
  end
  always @(negedge rclk) r_ready <= (got < 3000) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 9) == 0);

  initial begin
    wrst = 1; rrst = 1; w_valid = 0; r_ready = 0; w_data = 0;
    #50 wrst = 0; rrst = 0;
    wait (got == 3000);
    wper = 3; rper = 7;    // reverse the clock relation for the second half
    wait (got == 6000);
    #200;
    check("words received", got, 6000);
    check("full seen", int'(fulls > 0), 1);
    check("empty seen", int'(empties > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
