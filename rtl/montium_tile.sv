// montium_tile: one coarse-grained reconfigurable processing tile.
//
// The tile processor (montium_tp) does the computation; below it the
// communication and configuration unit connects it to the network-on-chip.
// That unit is the Hydra-style network interface (hydra_ni) plus two
// dual-clock FIFOs (cdc_fifo), so that the NoC and the tile processor may run
// on unrelated clocks. All control of the tile (configuration, DMA,
// start/wait/reset) and all streaming data pass through the one NoC port.
// This split follows the source architecture; the FIFO depth and the NoC word
// width (16 bits, equal to the datapath) are this design's choices.
//
// NoC port: rx_* carries message words into the tile, tx_* carries replies
// and streaming output out of it; both are valid/ready handshakes on
// noc_clk. Resets are synchronous, active high, one per clock domain, and
// should be asserted together.
module montium_tile #(
  parameter int FIFO_DEPTH = 8
) (
  input  logic        noc_clk,
  input  logic        noc_rst,
  input  logic        tile_clk,
  input  logic        tile_rst,
  input  logic        rx_valid,
  output logic        rx_ready,
  input  logic [15:0] rx_data,
  output logic        tx_valid,
  input  logic        tx_ready,
  output logic [15:0] tx_data,
  // observation of the tile processor
  output logic        tp_running,
  output logic        tp_done,
  output logic        tp_stall
);
  import montium_pkg::*;

  logic          nrx_valid, nrx_ready, ntx_valid, ntx_ready;
  logic [15:0]   nrx_data, ntx_data;
  logic          cfg_we, dma_hold, dma_we, start, soft_reset;
  logic [15:0]   cfg_addr, cfg_wdata;
  logic [3:0]    dma_mem;
  logic [AW-1:0] dma_addr;
  logic [DW-1:0] dma_wdata, dma_rdata;
  logic          in_valid, in_pop, out_ready, out_push;
  logic [DW-1:0] in_data, out_data;

  cdc_fifo #(.DEPTH(FIFO_DEPTH), .DW(16)) u_rx_cdc (
    .wclk(noc_clk),  .wrst(noc_rst),  .w_valid(rx_valid),  .w_ready(rx_ready),  .w_data(rx_data),
    .rclk(tile_clk), .rrst(tile_rst), .r_valid(nrx_valid), .r_ready(nrx_ready), .r_data(nrx_data)
  );

  cdc_fifo #(.DEPTH(FIFO_DEPTH), .DW(16)) u_tx_cdc (
    .wclk(tile_clk), .wrst(tile_rst), .w_valid(ntx_valid), .w_ready(ntx_ready), .w_data(ntx_data),
    .rclk(noc_clk),  .rrst(noc_rst),  .r_valid(tx_valid),  .r_ready(tx_ready),  .r_data(tx_data)
  );

  hydra_ni u_ni (
    .clk(tile_clk), .rst(tile_rst),
    .rx_valid(nrx_valid), .rx_ready(nrx_ready), .rx_data(nrx_data),
    .tx_valid(ntx_valid), .tx_ready(ntx_ready), .tx_data(ntx_data),
    .cfg_we, .cfg_addr, .cfg_wdata,
    .dma_hold, .dma_we, .dma_mem, .dma_addr, .dma_wdata, .dma_rdata,
    .tp_start(start), .tp_reset(soft_reset), .tp_done,
    .in_valid, .in_data, .in_pop, .out_ready, .out_data, .out_push
  );

  montium_tp u_tp (
    .clk(tile_clk), .rst(tile_rst),
    .cfg_we, .cfg_addr, .cfg_wdata,
    .dma_hold, .dma_we, .dma_mem, .dma_addr, .dma_wdata, .dma_rdata,
    .start, .soft_reset,
    .running(tp_running), .done(tp_done), .stall(tp_stall),
    .in_valid, .in_data, .in_pop, .out_ready, .out_data, .out_push
  );

endmodule
