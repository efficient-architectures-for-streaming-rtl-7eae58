// alu_regfile: the private register file in front of one ALU input.
//
// Holds up to four 16-bit operands (the depth follows the source
// architecture). Each cycle one entry may be written from the interconnect
// and one entry is read out to the ALU. The file cannot be bypassed: a value
// written in cycle t reaches the ALU in cycle t+1 at the earliest, because the
// read port only ever shows stored contents.
//
// Interface: we/waddr/wdata write port (takes effect at the rising clock
// edge), raddr/rdata combinational read port. Synchronous active-high reset
// clears all entries (reset behaviour is this design's choice).
module alu_regfile #(
  parameter int DEPTH = 4,
  parameter int DW    = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rdata
);

  logic [DW-1:0] regs [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata = regs[raddr];

endmodule
