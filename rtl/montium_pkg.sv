// montium_pkg: types and constants shared by the Montium-style tile processor.
//
// The tile has five 16-bit ALUs, each with four input register files of four
// entries, and ten 16-bit x 1024-word local memories, each with its own
// address generation unit (these counts and sizes follow the source
// architecture). The decoded control word (ctl_t), the sequencer instruction
// format (seq_instr_t), the ALU operation codes, the interconnect source codes,
// the configuration address map and the network-interface message opcodes are
// this design's own choices.
package montium_pkg;

  localparam int DW        = 16;    // datapath width
  localparam int N_ALU     = 5;     // ALU1..ALU5
  localparam int N_IN      = 4;     // inputs A, B, C, D per ALU
  localparam int N_REG     = 4;     // operands per input register file
  localparam int N_MEM     = 10;    // local memories M01..M10
  localparam int MEM_DEPTH = 1024;  // words per local memory
  localparam int AW        = 10;    // local memory address width
  localparam int DEC_DEPTH = 32;    // configurable instructions in the decoder
  localparam int SEQ_DEPTH = 256;   // sequencer program memory entries

  // ---------------------------------------------------------------- ALU
  typedef enum logic [3:0] {
    OP_PASS = 4'd0,   // OUT1 = A,             OUT2 = B
    OP_ADD  = 4'd1,   // OUT1 = A + B,         OUT2 = C + D
    OP_SUB  = 4'd2,   // OUT1 = A - B,         OUT2 = C - D
    OP_MUL  = 4'd3,   // OUT1 = A * B,         OUT2 = C * D
    OP_MAC  = 4'd4,   // OUT1 = C + A*B (+E),  OUT2 = C - A*B  (butterfly)
    OP_AND  = 4'd5,   // OUT1 = A & B,         OUT2 = C & D
    OP_OR   = 4'd6,   // OUT1 = A | B,         OUT2 = C | D
    OP_XOR  = 4'd7,   // OUT1 = A ^ B,         OUT2 = C ^ D
    OP_MAX  = 4'd8,   // OUT1 = max(A+B, C+D), OUT2 = min(A+B, C+D)
    OP_ADDE = 4'd9    // OUT1 = A + E,         OUT2 = B + E
  } alu_op_t;

  typedef struct packed {
    alu_op_t    op;
    logic       fixp;                 // 1: signed Q15 with saturation, 0: signed integer
    logic       use_east;             // add the East input where the operation allows
    logic [1:0] rd_a, rd_b, rd_c, rd_d;  // operand selected from each register file
  } alu_ctl_t;

  // ------------------------------------------------------ interconnect
  // Source codes: 0..9 memory read data M01..M10, 10..19 ALU outputs
  // (ALUk OUT1 = 10+2(k-1), OUT2 = 11+2(k-1)), 20 input stream, 21 zero.
  localparam int N_SRC = 22;
  typedef logic [4:0] src_t;
  localparam src_t SRC_MEM0   = 5'd0;
  localparam src_t SRC_ALU0   = 5'd10;
  localparam src_t SRC_STREAM = 5'd20;
  localparam src_t SRC_ZERO   = 5'd21;

  typedef struct packed {
    logic       we;      // write this input register file
    logic [1:0] waddr;   // entry written
    src_t       src;     // where the written value comes from
  } reg_ctl_t;

  typedef enum logic [2:0] {
    AGU_HOLD  = 3'd0,
    AGU_STEP  = 3'd1,    // offset += stride  (mod length)
    AGU_STEP2 = 3'd2,    // offset += stride2 (mod length)
    AGU_RESET = 3'd3,    // offset  = 0
    AGU_LOAD  = 3'd4     // offset  = index from the interconnect (table lookup)
  } agu_cmd_t;

  typedef struct packed {
    logic     we;        // write the memory at the AGU address
    src_t     src;       // write data source
    agu_cmd_t agu;       // address update at the end of the cycle
    src_t     idx_src;   // index source for AGU_LOAD
  } mem_ctl_t;

  // Full decoded control word of one tile instruction.
  typedef struct packed {
    alu_ctl_t [N_ALU-1:0]        alu;
    reg_ctl_t [N_ALU*N_IN-1:0]   regs;  // index = alu*4 + input (A=0..D=3)
    mem_ctl_t [N_MEM-1:0]        mem;
    logic                        out_we;   // produce a word on the output stream
    src_t                        out_src;
    logic                        in_rd;    // consume a word of the input stream
  } ctl_t;

  localparam int CTL_BITS  = $bits(ctl_t);
  localparam int CTL_WORDS = (CTL_BITS + DW - 1) / DW;

  // ---------------------------------------------------------- sequencer
  typedef enum logic [2:0] {
    SQ_NEXT   = 3'd0,   // pc + 1
    SQ_JUMP   = 3'd1,   // pc = imm
    SQ_LOOP   = 3'd2,   // if cnt > 1: cnt--, pc = imm; else cnt = 0, pc + 1
    SQ_SETCNT = 3'd3,   // cnt = imm, pc + 1
    SQ_HALT   = 3'd4    // execute, then stop and report done
  } seq_flow_t;

  typedef struct packed {
    seq_flow_t  flow;
    logic       cnt_sel;   // loop counter 0 or 1
    logic [9:0] imm;       // jump target (low 8 bits) or counter value
    logic [4:0] dec;       // decoder entry executed by this instruction
  } seq_instr_t;

  localparam int SEQ_BITS  = $bits(seq_instr_t);
  localparam int SEQ_WORDS = (SEQ_BITS + DW - 1) / DW;

  // ------------------------------------------------ configuration space
  // 16-bit word addresses of the configuration memory.
  //   0x0000 + 2*entry + w      sequencer program, word w of an instruction
  //   0x1000 + 32*entry + w     decoder entry, word w of a control word
  //   0x2000 + 4*mem + r        AGU of memory mem: r=0 base, 1 stride, 2 stride2, 3 length
  localparam logic [15:0] CFG_SEQ_BASE = 16'h0000;
  localparam logic [15:0] CFG_DEC_BASE = 16'h1000;
  localparam logic [15:0] CFG_AGU_BASE = 16'h2000;
  localparam int          CFG_DEC_STRIDE = 32;

  // ------------------------------------------- network interface opcodes
  // Header word: [15:12] opcode, [11:8] memory select, [7:0] unused.
  typedef enum logic [3:0] {
    NI_CFG_WR  = 4'h1,  // addr, count, count data words -> configuration memory
    NI_MEM_WR  = 4'h2,  // addr, count, count data words -> local memory (DMA, TP halted)
    NI_MEM_RD  = 4'h3,  // addr, count -> count data words returned (DMA, TP halted)
    NI_START   = 4'h4,  // start the sequencer at program entry 0
    NI_WAIT    = 4'h5,  // reply with one status word once the TP has halted
    NI_RESET   = 4'h6,  // stop the TP and clear its sequencer state
    NI_STREAM  = 4'h7   // count, count data words -> TP input stream
  } ni_op_t;

  localparam logic [15:0] NI_DONE_WORD = 16'hD0E0;

endpackage
