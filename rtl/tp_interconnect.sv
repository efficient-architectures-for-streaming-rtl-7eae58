// tp_interconnect: the tile's flexible interconnect, modelled as a crossbar.
//
// Every destination (each of the 20 ALU input register files, each of the 10
// memory write ports, each of the 10 AGU lookup indices (low 10 bits) and the
// output stream) picks its value from any source:
// the 10 memory read ports, the 10 ALU outputs (OUT1/OUT2 of ALU1..ALU5), the
// input stream or zero. The selections come from the decoded tile instruction.
// That input registers and memories are fed "by various sources via a flexible
// interconnect" follows the source architecture; a full crossbar with one
// select per destination is this design's simplest reading of it.
//
// Timing: purely combinational.
module tp_interconnect
  import montium_pkg::*;
(
  input  ctl_t                        ctl,
  input  logic [N_MEM-1:0][DW-1:0]    mem_rdata,
  input  logic [N_ALU-1:0][DW-1:0]    alu_out1,
  input  logic [N_ALU-1:0][DW-1:0]    alu_out2,
  input  logic [DW-1:0]               stream_in,
  output logic [N_ALU*N_IN-1:0][DW-1:0] reg_wdata,
  output logic [N_MEM-1:0][DW-1:0]    mem_wdata,
  output logic [N_MEM-1:0][AW-1:0]    mem_idx,     // lookup index for each AGU
  output logic [DW-1:0]               stream_out
);

  logic [N_SRC-1:0][DW-1:0] bus;

  always_comb begin
    for (int m = 0; m < N_MEM; m++) bus[int'(SRC_MEM0) + m] = mem_rdata[m];
    for (int k = 0; k < N_ALU; k++) begin
      bus[int'(SRC_ALU0) + 2*k]     = alu_out1[k];
      bus[int'(SRC_ALU0) + 2*k + 1] = alu_out2[k];
    end
    bus[SRC_STREAM] = stream_in;
    bus[SRC_ZERO]   = '0;
  end

  function automatic logic [DW-1:0] pick(input src_t s, input logic [N_SRC-1:0][DW-1:0] b);
    return (int'(s) < N_SRC) ? b[s] : '0;
  endfunction

  always_comb begin
    for (int r = 0; r < N_ALU*N_IN; r++) reg_wdata[r] = pick(ctl.regs[r].src, bus);
    for (int m = 0; m < N_MEM; m++) begin
      mem_wdata[m] = pick(ctl.mem[m].src, bus);
      mem_idx[m]   = AW'(pick(ctl.mem[m].idx_src, bus));
    end
    stream_out = pick(ctl.out_src, bus);
  end

endmodule
