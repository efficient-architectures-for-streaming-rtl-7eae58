// agu: address generation unit of one local memory.
//
// Generates circular-buffer addresses: addr = (base + offset) mod 2^AW, where
// offset runs modulo a configured length and is moved each cycle by a command
// from the current tile instruction: hold, step by stride, step by stride2,
// return to zero, or load an index taken from the interconnect. The last one
// turns the memory into a lookup table: a data value (an ALU result, a stream
// word or another memory's word) selects the entry base + index, which is read
// in the next cycle. Two strides let one buffer be walked backwards and then
// advanced (for example a FIR delay line) without extra instructions. That an
// AGU accompanies every memory follows the source architecture; this
// particular address scheme is this design's choice, as is the registered
// (one cycle) table lookup.
//
// Configuration: four 16-bit registers written through cfg_we/cfg_reg/cfg_wdata
// (0 base, 1 stride, 2 stride2, 3 length; length 0 means 2^AW). Strides must be
// below the length. Timing: addr is registered state and changes at the
// rising edge after a command. Synchronous active-high reset clears offset
// and configuration; hold_en=0 freezes the offset (tile halted).
module agu #(
  parameter int AW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cfg_we,
  input  logic [1:0]    cfg_reg,
  input  logic [15:0]   cfg_wdata,
  input  logic          en,
  input  montium_pkg::agu_cmd_t cmd,
  input  logic [AW-1:0] load_idx,
  output logic [AW-1:0] addr
);

  logic [AW-1:0] base, stride, stride2;
  logic [AW:0]   len;
  logic [AW-1:0] offset;
  logic [AW:0]   len_eff, sum;
  logic [AW-1:0] step;

  always_comb begin
    len_eff = (len == '0) ? (AW+1)'(1 << AW) : len;
    step    = (cmd == montium_pkg::AGU_STEP2) ? stride2 : stride;
    sum     = {1'b0, offset} + {1'b0, step};
    if (sum >= len_eff) sum = sum - len_eff;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      base <= '0; stride <= '0; stride2 <= '0; len <= '0; offset <= '0;
    end else begin
      if (cfg_we) begin
        unique case (cfg_reg)
          2'd0: base    <= cfg_wdata[AW-1:0];
          2'd1: stride  <= cfg_wdata[AW-1:0];
          2'd2: stride2 <= cfg_wdata[AW-1:0];
          2'd3: len     <= cfg_wdata[AW:0];
        endcase
        offset <= '0;
      end else if (en) begin
        unique case (cmd)
          montium_pkg::AGU_HOLD:  offset <= offset;
          montium_pkg::AGU_STEP,
          montium_pkg::AGU_STEP2: offset <= sum[AW-1:0];
          montium_pkg::AGU_RESET: offset <= '0;
          montium_pkg::AGU_LOAD:  offset <= load_idx;
          default:                offset <= offset;
        endcase
      end
    end
  end

  assign addr = base + offset;

endmodule
