// montium_progs_pkg: tile programs and reference models used by the
// tile-processor and whole-tile testbenches.
//
// A configuration is a list of (address, 16-bit word) pairs in the
// configuration address map of montium_pkg. Two programs are provided:
//
//   FIR (streaming mode), N taps, Q15. M01 holds the delay line and M02 the
//   coefficients h[0..N-1]. Per input sample: instruction 0 writes the sample
//   into the delay line and clears the accumulator; instruction 1 repeats N
//   times, loading x[n-j] and h[j] into ALU1's A and B registers and adding
//   the product of the previous pair into C; instruction 2 adds the last
//   product and sends the result to the output stream, steps the delay-line
//   pointer and jumps back. N + 2 cycles per sample.
//     y[n] = fold over j = 0..N-1 of acc = sat(acc + ((h[j] * x[n-j]) >>> 15))
//
//   PSUM (block mode), L elements, Q15. ALU2 multiplies M03[i] by M04[i] and
//   passes the product West; ALU1 computes M01[i]*M02[i] + East and the
//   result is written to M05[i]. L + 2 instructions.
//     z[i] = sat(((M01[i]*M02[i]) >>> 15) + ((M03[i]*M04[i]) >>> 15))
//
//   LUT (streaming mode): M06 is used as a lookup table. Instruction 0 takes
//   an index from the input stream and loads it into M06's AGU; instruction 1
//   sends M06[base + index] to the output stream and jumps back.
//     y = M06[index mod 1024]
package montium_progs_pkg;
  import montium_pkg::*;

  typedef struct { int addr; int data; } cfg_word_t;
  typedef cfg_word_t cfg_list_t [$];

  function automatic void add_ctl(ref cfg_list_t q, input int entry, input ctl_t c);
    logic [CTL_WORDS*16-1:0] w = (CTL_WORDS*16)'(c);
    for (int i = 0; i < CTL_WORDS; i++)
      q.push_back('{int'(CFG_DEC_BASE) + CFG_DEC_STRIDE * entry + i, int'(w[16*i +: 16])});
  endfunction

  function automatic void add_seq(ref cfg_list_t q, input int entry, input seq_flow_t f,
                                  input bit cnt, input int imm, input int dec);
    seq_instr_t s;
    logic [31:0] w;
    s.flow = f; s.cnt_sel = cnt; s.imm = 10'(imm); s.dec = 5'(dec);
    w = 32'(s);
    q.push_back('{int'(CFG_SEQ_BASE) + 2 * entry,     int'(w[15:0])});
    q.push_back('{int'(CFG_SEQ_BASE) + 2 * entry + 1, int'(w[31:16])});
  endfunction

  function automatic void add_agu(ref cfg_list_t q, input int m, input int base, input int s1,
                                  input int s2, input int len);
    q.push_back('{int'(CFG_AGU_BASE) + 4 * m + 0, base});
    q.push_back('{int'(CFG_AGU_BASE) + 4 * m + 1, s1});
    q.push_back('{int'(CFG_AGU_BASE) + 4 * m + 2, s2});
    q.push_back('{int'(CFG_AGU_BASE) + 4 * m + 3, len & 32'h7ff});
  endfunction

  function automatic reg_ctl_t rw(src_t s);
    reg_ctl_t r;
    r.we = 1'b1; r.waddr = 2'd0; r.src = s;
    return r;
  endfunction

  // ------------------------------------------------------------------ FIR
  function automatic cfg_list_t fir_config(int taps);
    cfg_list_t q;
    ctl_t c0, c1, c2;
    // entry 0: sample in -> M01, clear A and C of ALU1
    c0 = '0;
    c0.in_rd      = 1'b1;
    c0.mem[0].we  = 1'b1;
    c0.mem[0].src = SRC_STREAM;
    c0.regs[0]    = rw(SRC_ZERO);
    c0.regs[2]    = rw(SRC_ZERO);
    // entry 1: load x, h; accumulate previous product
    c1 = '0;
    c1.alu[0].op   = OP_MAC;
    c1.alu[0].fixp = 1'b1;
    c1.regs[0]     = rw(SRC_MEM0 + 5'd0);
    c1.regs[1]     = rw(SRC_MEM0 + 5'd1);
    c1.regs[2]     = rw(SRC_ALU0);
    c1.mem[0].agu  = AGU_STEP;
    c1.mem[1].agu  = AGU_STEP;
    // entry 2: final product, result to the output stream, advance delay line
    c2 = '0;
    c2.alu[0].op   = OP_MAC;
    c2.alu[0].fixp = 1'b1;
    c2.out_we      = 1'b1;
    c2.out_src     = SRC_ALU0;
    c2.mem[0].agu  = AGU_STEP2;
    add_ctl(q, 0, c0);
    add_ctl(q, 1, c1);
    add_ctl(q, 2, c2);
    add_seq(q, 0, SQ_SETCNT, 0, taps, 0);
    add_seq(q, 1, SQ_LOOP,   0, 1,    1);
    add_seq(q, 2, SQ_JUMP,   0, 0,    2);
    add_agu(q, 0, 0, taps - 1, 1, taps);
    add_agu(q, 1, 0, 1, 0, taps);
    return q;
  endfunction

  function automatic int sat16(int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  function automatic int q15mul(int a, int b);
    return sat16((a * b) >>> 15);
  endfunction

  // Reference FIR: hist[0] is the newest sample.
  function automatic int fir_ref(int h [], int hist []);
    int acc = 0;
    for (int j = 0; j < h.size(); j++) acc = sat16(acc + q15mul(h[j], hist[j]));
    return acc;
  endfunction

  // ----------------------------------------------------------------- PSUM
  function automatic cfg_list_t psum_config(int len);
    cfg_list_t q;
    ctl_t c0, c1;
    c0 = '0;
    for (int m = 0; m < 4; m++) c0.mem[m].agu = AGU_STEP;
    c0.regs[0] = rw(SRC_MEM0 + 5'd0);   // ALU1 A <- M01
    c0.regs[1] = rw(SRC_MEM0 + 5'd1);   // ALU1 B <- M02
    c0.regs[2] = rw(SRC_ZERO);          // ALU1 C <- 0
    c0.regs[4] = rw(SRC_MEM0 + 5'd2);   // ALU2 A <- M03
    c0.regs[5] = rw(SRC_MEM0 + 5'd3);   // ALU2 B <- M04
    c1 = c0;
    c1.regs[2]         = '0;
    c1.alu[0].op       = OP_MAC;
    c1.alu[0].fixp     = 1'b1;
    c1.alu[0].use_east = 1'b1;
    c1.alu[1].op       = OP_MUL;
    c1.alu[1].fixp     = 1'b1;
    c1.mem[4].we       = 1'b1;
    c1.mem[4].src      = SRC_ALU0;      // ALU1 OUT1
    c1.mem[4].agu      = AGU_STEP;
    add_ctl(q, 4, c0);
    add_ctl(q, 5, c1);
    add_seq(q, 0, SQ_SETCNT, 1, len, 4);
    add_seq(q, 1, SQ_LOOP,   1, 1,   5);
    add_seq(q, 2, SQ_HALT,   0, 0,   6);  // entry 6 is never written: no operation
    for (int m = 0; m < 5; m++) add_agu(q, m, 0, 1, 0, 0);
    return q;
  endfunction

  // ------------------------------------------------------------------ LUT
  function automatic cfg_list_t lut_config();
    cfg_list_t q;
    ctl_t c0, c1;
    c0 = '0;
    c0.in_rd          = 1'b1;
    c0.mem[5].agu     = AGU_LOAD;
    c0.mem[5].idx_src = SRC_STREAM;
    c1 = '0;
    c1.out_we  = 1'b1;
    c1.out_src = SRC_MEM0 + 5'd5;
    add_ctl(q, 8, c0);
    add_ctl(q, 9, c1);
    add_seq(q, 0, SQ_NEXT, 0, 0, 8);
    add_seq(q, 1, SQ_JUMP, 0, 0, 9);
    add_agu(q, 5, 0, 0, 0, 0);
    return q;
  endfunction

  // Sine table entry: round(32767 * sin(2*pi*i/1024)).
  function automatic int sine_entry(int i);
    real v = 32767.0 * $sin(2.0 * 3.14159265358979 * real'(i) / 1024.0);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

endpackage
