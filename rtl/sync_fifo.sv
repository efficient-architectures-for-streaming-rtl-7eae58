// sync_fifo: small single-clock FIFO (helper of the network interface).
//
// Buffers the words of a streaming-mode input message until the tile
// processor consumes them. First-word-fall-through: rd_data shows the head
// word whenever rd_valid is high; a word is taken on an edge where rd_valid
// and rd_ready are high and stored on an edge where wr_valid and wr_ready are
// high. Synchronous active-high reset empties it. Depth is this design's
// choice.
module sync_fifo #(
  parameter int DEPTH = 8,
  parameter int DW    = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic [DW-1:0] wr_data,
  output logic          rd_valid,
  input  logic          rd_ready,
  output logic [DW-1:0] rd_data
);

  localparam int PW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   count;
  logic          push, pop;

  assign wr_ready = (count != (PW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rp];
  assign push     = wr_valid && wr_ready;
  assign pop      = rd_valid && rd_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wr_data;
  end

endmodule
