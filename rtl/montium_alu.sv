// montium_alu: one 16-bit tile ALU, purely combinational.
//
// Four operands A..D come from the ALU's input register files; two results
// OUT1 and OUT2 go back to the interconnect. A West output carries the product
// A*B to the neighbouring ALU on the left, whose East input can add it in, so
// that neighbouring ALUs can chain a sum of products without the interconnect.
// The widths, the two outputs, the East/West neighbour link, the absence of
// pipeline registers and the support for signed integer and signed fixed-point
// arithmetic follow the source architecture. The operation set (see alu_op_t)
// and the arithmetic details are this design's choice: in fixed-point mode
// operands are Q15, a product is (A*B)>>>15 and every result saturates; in
// integer mode a product keeps the low 16 bits and sums wrap around.
//
// Timing: no clock; results settle in the same cycle as the operands.
module montium_alu
  import montium_pkg::*;
(
  input  alu_op_t           op,
  input  logic              fixp,
  input  logic              use_east,
  input  logic signed [15:0] a, b, c, d,
  input  logic signed [15:0] east,   // from the West output of the ALU on the right
  output logic signed [15:0] out1,
  output logic signed [15:0] out2,
  output logic signed [15:0] west    // to the East input of the ALU on the left
);

  // Reduce a wide signed value to 16 bits: saturate in fixed-point mode,
  // wrap in integer mode.
  function automatic logic signed [15:0] fit(input logic signed [19:0] v, input logic sat);
    if (sat && v > 20'sd32767)       return 16'sh7fff;
    else if (sat && v < -20'sd32768) return 16'sh8000;
    else                             return v[15:0];
  endfunction

  function automatic logic signed [15:0] mul(input logic signed [15:0] x, input logic signed [15:0] y,
                                             input logic q15);
    logic signed [31:0] p;
    logic signed [19:0] s;
    p = x * y;
    if (q15) begin
      s = 20'(p >>> 15);                 // only -1 * -1 leaves the Q15 range
      return fit(s, 1'b1);
    end
    return p[15:0];
  endfunction

  logic signed [15:0] pab, pcd, e;
  logic signed [19:0] s_ab, s_cd;

  always_comb begin
    pab  = mul(a, b, fixp);
    pcd  = mul(c, d, fixp);
    e    = use_east ? east : 16'sd0;
    s_ab = 20'(a) + 20'(b);
    s_cd = 20'(c) + 20'(d);
    west = pab;
    out1 = '0;
    out2 = '0;
    unique case (op)
      OP_PASS: begin out1 = a;                                out2 = b;                                end
      OP_ADD:  begin out1 = fit(s_ab, fixp);                  out2 = fit(s_cd, fixp);                  end
      OP_SUB:  begin out1 = fit(20'(a) - 20'(b), fixp);       out2 = fit(20'(c) - 20'(d), fixp);       end
      OP_MUL:  begin out1 = pab;                              out2 = pcd;                              end
      OP_MAC:  begin out1 = fit(20'(c) + 20'(pab) + 20'(e), fixp);
                     out2 = fit(20'(c) - 20'(pab), fixp);                                              end
      OP_AND:  begin out1 = a & b;                            out2 = c & d;                            end
      OP_OR:   begin out1 = a | b;                            out2 = c | d;                            end
      OP_XOR:  begin out1 = a ^ b;                            out2 = c ^ d;                            end
      OP_MAX:  begin out1 = fit((s_ab > s_cd) ? s_ab : s_cd, fixp);
                     out2 = fit((s_ab > s_cd) ? s_cd : s_ab, fixp);                                    end
      OP_ADDE: begin out1 = fit(20'(a) + 20'(e), fixp);       out2 = fit(20'(b) + 20'(e), fixp);       end
      default: begin out1 = '0;                               out2 = '0;                               end
    endcase
  end

endmodule
