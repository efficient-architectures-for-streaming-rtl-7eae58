// chameleon_soc: the tiled system top level: a mesh network with Montium
// tiles attached, and open network ports for the other tiles.
//
// Structure: a noc_mesh of X x Y routers. Montium tiles sit at nodes
// 1 .. N_MONTIUM (node n is at x = n mod X, y = n div X); each one is a
// montium_tile (network interface, clock-domain crossing, tile processor)
// joined to its router by a tile_noc_adapter. Every other node's router
// local port is brought out on the ext_* ports; node 0 is intended for the
// central coordinating node (CCN), and the rest for FPGA, DSP or further
// tiles modelled outside this module. The ext_* signals of Montium nodes are
// not connected inside (their ready and valid outputs are held low).
//
// Interface: noc_clk/noc_rst for the network and the network side of every
// tile; tile_clk[i]/tile_rst[i] for Montium tile i, so every tile can run
// at its own clock. ext_in_* / ext_out_* per node: flit valid, flit, and
// per-class ready (index 0 BE, 1 GT), same timing as the mesh local ports.
// Status: tp_running/tp_done/tp_stall per Montium tile, gt_first per node.
//
// Follows the document: tiles of different kinds joined by a NoC with GT and
// BE traffic, a CCN that configures the tiles by messages, per-tile network
// interfaces that synchronise to the tile clock, and the 6x6 network size
// ("Figure 4 presents the simulation results for a 6x6 NoC"). The number
// and placement of Montium tiles: not mentioned; 4 at nodes 1..4 is this
// design's choice.
module chameleon_soc
  import noc_pkg::*;
#(
  parameter int X          = 6,
  parameter int Y          = 6,
  parameter int N_MONTIUM  = 4,
  parameter int FIFO_DEPTH = 8,
  parameter int MAX_WORDS  = 128
) (
  input  logic                      noc_clk,
  input  logic                      noc_rst,
  input  logic  [N_MONTIUM-1:0]     tile_clk,
  input  logic  [N_MONTIUM-1:0]     tile_rst,
  input  logic  [X*Y-1:0]           ext_in_valid,
  input  flit_t [X*Y-1:0]           ext_in_flit,
  output logic  [X*Y-1:0][1:0]      ext_in_ready,
  output logic  [X*Y-1:0]           ext_out_valid,
  output flit_t [X*Y-1:0]           ext_out_flit,
  input  logic  [X*Y-1:0][1:0]      ext_out_ready,
  output logic  [N_MONTIUM-1:0]     tp_running,
  output logic  [N_MONTIUM-1:0]     tp_done,
  output logic  [N_MONTIUM-1:0]     tp_stall,
  output logic  [X*Y-1:0]           gt_first
);

  localparam int NN = X * Y;

  logic  [NN-1:0]      loc_in_valid, loc_out_valid;
  flit_t [NN-1:0]      loc_in_flit, loc_out_flit;
  logic  [NN-1:0][1:0] loc_in_ready, loc_out_ready;

  noc_mesh #(.X(X), .Y(Y)) u_mesh (
    .clk (noc_clk), .rst (noc_rst),
    .loc_in_valid, .loc_in_flit, .loc_in_ready,
    .loc_out_valid, .loc_out_flit, .loc_out_ready,
    .gt_first
  );

  for (genvar n = 0; n < NN; n++) begin : g_node
    if (n >= 1 && n <= N_MONTIUM) begin : g_montium
      localparam int I = n - 1;
      logic        rx_valid, rx_ready, tx_valid, tx_ready;
      logic [15:0] rx_data, tx_data;

      tile_noc_adapter #(.MAX_WORDS(MAX_WORDS)) u_adapter (
        .clk (noc_clk), .rst (noc_rst),
        .my_x (4'(n % X)), .my_y (4'(n / X)),
        .net_in_valid  (loc_out_valid[n]),
        .net_in_flit   (loc_out_flit[n]),
        .net_in_ready  (loc_out_ready[n]),
        .net_out_valid (loc_in_valid[n]),
        .net_out_flit  (loc_in_flit[n]),
        .net_out_ready (loc_in_ready[n]),
        .rx_valid, .rx_data, .rx_ready,
        .tx_valid, .tx_data, .tx_ready
      );

      montium_tile #(.FIFO_DEPTH(FIFO_DEPTH)) u_tile (
        .noc_clk, .noc_rst,
        .tile_clk (tile_clk[I]), .tile_rst (tile_rst[I]),
        .rx_valid, .rx_ready, .rx_data,
        .tx_valid, .tx_ready, .tx_data,
        .tp_running (tp_running[I]),
        .tp_done    (tp_done[I]),
        .tp_stall   (tp_stall[I])
      );

      assign ext_in_ready[n]  = 2'b00;
      assign ext_out_valid[n] = 1'b0;
      assign ext_out_flit[n]  = '0;
    end else begin : g_port
      assign loc_in_valid[n]  = ext_in_valid[n];
      assign loc_in_flit[n]   = ext_in_flit[n];
      assign ext_in_ready[n]  = loc_in_ready[n];
      assign ext_out_valid[n] = loc_out_valid[n];
      assign ext_out_flit[n]  = loc_out_flit[n];
      assign loc_out_ready[n] = ext_out_ready[n];
    end
  end

endmodule
