// tb_montium_alu: self-checking test of the combinational tile ALU.
//
// Drives every operation in both arithmetic modes with random operands plus
// corner values (most negative, most positive, zero) and compares OUT1,
// OUT2 and West with a reference computed here with 32-bit integers.
module tb_montium_alu;
  import montium_pkg::*;

  alu_op_t            op;
  logic               fixp, use_east;
  logic signed [15:0] a, b, c, d, east, out1, out2, west;
  int checks = 0, failures = 0;

  montium_alu dut (.*);


  function automatic int wrap16(int v);
    int w = v & 32'hffff;
    return (w >= 32768) ? w - 65536 : w;
  endfunction

  function automatic int red(int v, bit sat);
    return sat ? ((v > 32767) ? 32767 : (v < -32768) ? -32768 : v) : wrap16(v);
  endfunction

  function automatic int mulr(int x, int y, bit q);
    if (q) return red((x * y) >>> 15, 1'b1);
    return wrap16(x * y);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s op=%0d fixp=%0d a=%0d b=%0d c=%0d d=%0d e=%0d got=%0d exp=%0d",
                                  what, op, fixp, a, b, c, d, east, got, exp);
    end
  endtask

  int ia, ib, ic, id, ie, e1, e2, ew, sab, scd;
  int corner [5] = '{-32768, 32767, 0, 1, -1};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      op       = alu_op_t'(n % 10);
      fixp     = n[4];
      use_east = n[5];
      if (n < 400) begin
        a = 16'(corner[$urandom_range(0, 4)]); b = 16'(corner[$urandom_range(0, 4)]);
        c = 16'(corner[$urandom_range(0, 4)]); d = 16'(corner[$urandom_range(0, 4)]);
        east = 16'(corner[$urandom_range(0, 4)]);
      end else begin
        a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); d = 16'($urandom); east = 16'($urandom);
      end
      #1;
      ia = int'(a); ib = int'(b); ic = int'(c); id = int'(d); ie = use_east ? int'(east) : 0;
      sab = ia + ib; scd = ic + id;
      ew = mulr(ia, ib, fixp);
      unique case (op)
        OP_PASS: begin e1 = ia;                       e2 = ib;                       end
        OP_ADD:  begin e1 = red(sab, fixp);           e2 = red(scd, fixp);           end
        OP_SUB:  begin e1 = red(ia - ib, fixp);       e2 = red(ic - id, fixp);       end
        OP_MUL:  begin e1 = ew;                       e2 = mulr(ic, id, fixp);       end
        OP_MAC:  begin e1 = red(ic + ew + ie, fixp);  e2 = red(ic - ew, fixp);       end
        OP_AND:  begin e1 = wrap16(ia & ib);          e2 = wrap16(ic & id);          end
        OP_OR:   begin e1 = wrap16(ia | ib);          e2 = wrap16(ic | id);          end
        OP_XOR:  begin e1 = wrap16(ia ^ ib);          e2 = wrap16(ic ^ id);          end
        OP_MAX:  begin e1 = red(sab > scd ? sab : scd, fixp); e2 = red(sab > scd ? scd : sab, fixp); end
        default: begin e1 = red(ia + ie, fixp);       e2 = red(ib + ie, fixp);       end
      endcase
      check("out1", int'(out1), e1);
      check("out2", int'(out2), e2);
      check("west", int'(west), ew);
    end
    // Spot values worked by hand: 0.5 * 0.5 = 0.25 in Q15; -1 * -1 saturates.
    op = OP_MUL; fixp = 1; a = 16'sh4000; b = 16'sh4000; c = 16'sh8000; d = 16'sh8000; #1;
    check("q15 0.5*0.5", int'(out1), 8192);
    check("q15 -1*-1",   int'(out2), 32767);
    op = OP_ADD; fixp = 0; a = 16'sh7fff; b = 16'sd1; #1;
    check("int wrap", int'(out1), -32768);
    fixp = 1; #1;
    check("fixp sat", int'(out1), 32767);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
