// hydra_ni: the tile's network interface (runs on the tile clock).
//
// Interprets a stream of 16-bit message words from the NoC and serves the
// tile processor in the two ways the source architecture describes:
//   * block mode: the interface is master of the tile. It writes the
//     configuration memory (NI_CFG_WR), moves data blocks into or out of the
//     local memories by DMA (NI_MEM_WR / NI_MEM_RD) while holding the tile
//     processor halted, starts it (NI_START), reports when it has finished
//     (NI_WAIT) and resets it (NI_RESET);
//   * streaming mode: the tile processor is master. Words of an NI_STREAM
//     message go to an input FIFO that the running program consumes, and every
//     word the program emits is sent to the NoC at once.
// The set of services follows the source architecture; the message format
// and opcodes (montium_pkg::ni_op_t) are this design's:
//   header [15:12] opcode, [11:8] memory, then for CFG_WR/MEM_WR/MEM_RD an
//   address word, for those and STREAM a count word, then count data words.
//
// Timing: one message word is accepted per cycle, so configuration and DMA
// move one 16-bit word per clock after a 3-word header. A read returns one
// word per cycle while tx_ready is high. The tile processor is halted from the
// header of a DMA message until its last word. Synchronous active-high reset.
module hydra_ni
  import montium_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  // from the NoC (via the clock-domain FIFO)
  input  logic          rx_valid,
  output logic          rx_ready,
  input  logic [15:0]   rx_data,
  // to the NoC (via the clock-domain FIFO)
  output logic          tx_valid,
  input  logic          tx_ready,
  output logic [15:0]   tx_data,
  // tile processor
  output logic          cfg_we,
  output logic [15:0]   cfg_addr,
  output logic [15:0]   cfg_wdata,
  output logic          dma_hold,
  output logic          dma_we,
  output logic [3:0]    dma_mem,
  output logic [AW-1:0] dma_addr,
  output logic [DW-1:0] dma_wdata,
  input  logic [DW-1:0] dma_rdata,
  output logic          tp_start,
  output logic          tp_reset,
  input  logic          tp_done,
  output logic          in_valid,
  output logic [DW-1:0] in_data,
  input  logic          in_pop,
  output logic          out_ready,
  input  logic [DW-1:0] out_data,
  input  logic          out_push
);

  typedef enum logic [2:0] {S_HDR, S_ADDR, S_CNT, S_WDATA, S_RDATA, S_SDATA, S_WAIT} state_t;

  state_t      state;
  ni_op_t      op;
  logic [3:0]  mem_sel;
  logic [15:0] addr, count;
  logic        s_wr_valid, s_wr_ready;
  logic        rx_take;

  // ------------------------------------------------- streaming input FIFO
  sync_fifo #(.DEPTH(8), .DW(DW)) u_in_fifo (
    .clk, .rst,
    .wr_valid (s_wr_valid),
    .wr_ready (s_wr_ready),
    .wr_data  (rx_data),
    .rd_valid (in_valid),
    .rd_ready (in_pop),
    .rd_data  (in_data)
  );

  // --------------------------------------------------------------- rx side
  always_comb begin
    rx_ready   = 1'b0;
    s_wr_valid = 1'b0;
    unique case (state)
      S_HDR, S_ADDR, S_CNT, S_WDATA: rx_ready = 1'b1;
      S_SDATA: begin
        s_wr_valid = rx_valid;
        rx_ready   = s_wr_ready;
      end
      default: rx_ready = 1'b0;
    endcase
  end
  assign rx_take = rx_valid && rx_ready;

  // Outputs to the tile processor.
  assign dma_hold  = (op == NI_MEM_WR || op == NI_MEM_RD) &&
                     (state == S_ADDR || state == S_CNT || state == S_WDATA || state == S_RDATA);
  assign dma_mem   = mem_sel;
  assign dma_addr  = addr[AW-1:0];
  assign dma_wdata = rx_data;
  assign dma_we    = (state == S_WDATA) && (op == NI_MEM_WR) && rx_valid;
  assign cfg_we    = (state == S_WDATA) && (op == NI_CFG_WR) && rx_valid;
  assign cfg_addr  = addr;
  assign cfg_wdata = rx_data;
  assign tp_start  = (state == S_HDR) && rx_valid && (ni_op_t'(rx_data[15:12]) == NI_START);
  assign tp_reset  = (state == S_HDR) && rx_valid && (ni_op_t'(rx_data[15:12]) == NI_RESET);

  // --------------------------------------------------------------- tx side
  // DMA read data and the completion word have the port while their message
  // is served; otherwise the tile's output stream owns it.
  always_comb begin
    if (state == S_RDATA) begin
      tx_valid  = 1'b1;
      tx_data   = dma_rdata;
      out_ready = 1'b0;
    end else if (state == S_WAIT) begin
      tx_valid  = tp_done;
      tx_data   = NI_DONE_WORD;
      out_ready = 1'b0;
    end else begin
      tx_valid  = out_push;
      tx_data   = out_data;
      out_ready = tx_ready;
    end
  end

  // ------------------------------------------------------- message decoder
  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_HDR;
      op      <= NI_START;
      mem_sel <= '0;
      addr    <= '0;
      count   <= '0;
    end else begin
      unique case (state)
        S_HDR: if (rx_take) begin
          op      <= ni_op_t'(rx_data[15:12]);
          mem_sel <= rx_data[11:8];
          unique case (ni_op_t'(rx_data[15:12]))
            NI_CFG_WR, NI_MEM_WR, NI_MEM_RD: state <= S_ADDR;
            NI_STREAM:                       state <= S_CNT;
            NI_WAIT:                         state <= S_WAIT;
            default:                         state <= S_HDR;   // START, RESET, unknown
          endcase
        end
        S_ADDR: if (rx_take) begin
          addr  <= rx_data;
          state <= S_CNT;
        end
        S_CNT: if (rx_take) begin
          count <= rx_data;
          if (rx_data == '0)         state <= S_HDR;
          else if (op == NI_MEM_RD)  state <= S_RDATA;
          else if (op == NI_STREAM)  state <= S_SDATA;
          else                       state <= S_WDATA;
        end
        S_WDATA: if (rx_take) begin
          addr  <= addr + 1'b1;
          count <= count - 1'b1;
          if (count == 16'd1) state <= S_HDR;
        end
        S_RDATA: if (tx_ready) begin
          addr  <= addr + 1'b1;
          count <= count - 1'b1;
          if (count == 16'd1) state <= S_HDR;
        end
        S_SDATA: if (rx_take) begin
          count <= count - 1'b1;
          if (count == 16'd1) state <= S_HDR;
        end
        S_WAIT: if (tp_done && tx_ready) state <= S_HDR;
        default: state <= S_HDR;
      endcase
    end
  end

endmodule
