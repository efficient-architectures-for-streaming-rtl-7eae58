// cdc_fifo: asynchronous FIFO between the NoC clock and the tile clock.
//
// The network interface must pass words between a NoC and a tile processor
// that need not run at the same clock rate (a requirement of the source
// architecture). This is the usual dual-clock FIFO: binary pointers in each
// domain, Gray-coded copies passed through two-flop synchronisers, full and
// empty computed from the synchronised Gray pointers. Depth (a power of two)
// and structure are this design's choices.
//
// Interface: write side wclk/wrst/w_valid/w_ready/w_data, read side
// rclk/rrst/r_valid/r_ready/r_data (first-word-fall-through: r_data shows the
// head word whenever r_valid is high). A word moves on a clock edge where
// valid and ready are both high. Each side has its own synchronous
// active-high reset; both must be asserted together at start-up.
module cdc_fifo #(
  parameter int DEPTH = 8,
  parameter int DW    = 16
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          w_valid,
  output logic          w_ready,
  input  logic [DW-1:0] w_data,
  input  logic          rclk,
  input  logic          rrst,
  output logic          r_valid,
  input  logic          r_ready,
  output logic [DW-1:0] r_data
);

  localparam int PW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [PW:0]   wbin, wgray, rbin, rgray;
  logic [PW:0]   rgray_w1, rgray_w2;   // read pointer seen in the write domain
  logic [PW:0]   wgray_r1, wgray_r2;   // write pointer seen in the read domain
  logic [PW:0]   wbin_nx, rbin_nx;

  function automatic logic [PW:0] b2g(input logic [PW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------------------------------------------------- write side
  assign w_ready = (wgray != {~rgray_w2[PW:PW-1], rgray_w2[PW-2:0]});
  assign wbin_nx = wbin + (PW+1)'(w_valid && w_ready);

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= b2g(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) begin
    if (w_valid && w_ready) mem[wbin[PW-1:0]] <= w_data;
  end

  // ----------------------------------------------------------- read side
  assign r_valid = (rgray != wgray_r2);
  assign r_data  = mem[rbin[PW-1:0]];
  assign rbin_nx = rbin + (PW+1)'(r_valid && r_ready);

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= b2g(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

endmodule
