// local_memory: one tile-local data memory (M01..M10).
//
// 16 bits wide and 1024 words deep, as in the source architecture; it serves
// as data buffer and as lookup table. One word is read and one written per
// cycle. The read is asynchronous so that, within one tile instruction, the
// word at the current AGU address can be routed straight to the interconnect;
// a read of the address being written returns the old word. The array stands
// in for the embedded SRAM macro of an ASIC implementation. There is no reset:
// contents are defined by writes (DMA from the network interface or the
// datapath).
module local_memory #(
  parameter int DEPTH = 1024,
  parameter int DW    = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
