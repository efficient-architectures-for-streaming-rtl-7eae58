// instr_decoder: store of the configurable tile instructions.
//
// Each of DEPTH entries holds one full control word (ctl_t): operation and
// operand selects of every ALU, writes of every input register file, write
// and AGU commands of every memory, and the streaming I/O bits. The
// sequencer names an entry each cycle and the decoder returns its control
// word; a small index thereby steers the whole datapath. That instructions are
// configurable and kept in the decoders follows the source architecture; one
// table of complete control words and its depth are this design's choices.
//
// Configuration: the table is RAM, written one 16-bit word at a time
// (cfg_entry, cfg_word, cfg_wdata), so only changed words need rewriting.
// Timing: write at the rising edge, read combinational. Synchronous
// active-high reset clears every entry to a no-operation control word.
module instr_decoder
  import montium_pkg::*;
#(
  parameter int DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     cfg_we,
  input  logic [$clog2(DEPTH)-1:0] cfg_entry,
  input  logic [4:0]               cfg_word,
  input  logic [15:0]              cfg_wdata,
  input  logic [$clog2(DEPTH)-1:0] sel,
  output ctl_t                     ctl
);

  localparam int EW = CTL_WORDS * 16;

  logic [EW-1:0] table_q [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) table_q[i] <= '0;
    end else if (cfg_we && int'(cfg_word) < CTL_WORDS) begin
      table_q[cfg_entry][16*cfg_word +: 16] <= cfg_wdata;
    end
  end

  assign ctl = ctl_t'(table_q[sel][CTL_BITS-1:0]);

endmodule
