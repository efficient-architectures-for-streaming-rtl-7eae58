// sequencer: the tile's program counter and loop control.
//
// Holds a program of DEPTH instructions (seq_instr_t). Each executed
// instruction names a decoder entry, which drives the datapath for that
// cycle, and a flow operation: next, jump, loop on one of two counters,
// load a counter, or halt. The tile is thus controlled by a small, fully
// static schedule. The sequencer stalls (the cycle has no effect) when the
// current instruction consumes an input-stream word that has not arrived or
// produces an output word with no room, and it is frozen while the network
// interface holds the tile for a block-mode transfer. That a simple sequencer
// selects configurable instructions follows the source architecture; the
// instruction format, the counters and the stall rules are this design's.
//
// Interface: start begins execution at entry 0; soft_reset returns to idle;
// done is high after a HALT until the next start. exec is high in each cycle
// whose instruction takes effect. Configuration writes one 16-bit word
// (cfg_entry, cfg_word) of the program. Timing: program read combinational,
// state changes at the rising edge. Synchronous active-high reset.
module sequencer
  import montium_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     cfg_we,
  input  logic [$clog2(DEPTH)-1:0] cfg_entry,
  input  logic                     cfg_word,
  input  logic [15:0]              cfg_wdata,
  input  logic                     start,
  input  logic                     soft_reset,
  input  logic                     hold,
  input  logic                     need_in,     // current instruction reads the input stream
  input  logic                     in_avail,
  input  logic                     need_out,    // current instruction writes the output stream
  input  logic                     out_space,
  output logic [4:0]               dec_sel,
  output logic                     exec,
  output logic                     stall,
  output logic                     running,
  output logic                     done
);

  localparam int PW = $clog2(DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;

  logic [SEQ_WORDS*16-1:0] prog [DEPTH];
  state_t                  state;
  logic [PW-1:0]           pc;
  logic [9:0]              cnt [2];
  seq_instr_t              ins;

  assign ins     = seq_instr_t'(prog[pc][SEQ_BITS-1:0]);
  assign dec_sel = ins.dec;
  assign running = (state == S_RUN);
  assign done    = (state == S_DONE);
  assign stall   = running && !hold && ((need_in && !in_avail) || (need_out && !out_space));
  assign exec    = running && !hold && !stall;

  always_ff @(posedge clk) begin
    if (cfg_we) prog[cfg_entry][16*cfg_word +: 16] <= cfg_wdata;
  end

  always_ff @(posedge clk) begin
    if (rst || soft_reset) begin
      state  <= S_IDLE;
      pc     <= '0;
      cnt[0] <= '0;
      cnt[1] <= '0;
    end else if (start) begin
      state <= S_RUN;
      pc    <= '0;
    end else if (exec) begin
      unique case (ins.flow)
        SQ_NEXT:   pc <= pc + 1'b1;
        SQ_JUMP:   pc <= PW'(ins.imm);
        SQ_LOOP:
          if (cnt[ins.cnt_sel] > 10'd1) begin
            cnt[ins.cnt_sel] <= cnt[ins.cnt_sel] - 1'b1;
            pc               <= PW'(ins.imm);
          end else begin
            cnt[ins.cnt_sel] <= '0;
            pc               <= pc + 1'b1;
          end
        SQ_SETCNT: begin
          cnt[ins.cnt_sel] <= ins.imm;
          pc               <= pc + 1'b1;
        end
        SQ_HALT:   state <= S_DONE;
        default:   pc <= pc + 1'b1;
      endcase
    end
  end

endmodule
