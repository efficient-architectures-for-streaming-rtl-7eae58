// noc_mesh: X-by-Y mesh of noc_router, one router per tile position.
//
// Router (x, y) links to its four neighbours; links at the mesh edge are tied
// off. Every router's local port is brought out, indexed n = y*X + x, as the
// place where a tile's network interface attaches. The mesh size defaults to
// 6 x 6 ("Figure 4 presents the simulation results for a 6x6 NoC"); the
// mesh topology itself is not mentioned and is this design's choice.
//
// Local port interface, per node: loc_in_* carries flits from the tile into
// the network, loc_out_* from the network to the tile; ready is per class
// (index 0 BE, 1 GT). gt_first reports, per node, that a GT flit was sent
// ahead of a waiting BE flit on one of the router's links this cycle.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int X     = 6,
  parameter int Y     = 6,
  parameter int DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic  [X*Y-1:0]        loc_in_valid,
  input  flit_t [X*Y-1:0]        loc_in_flit,
  output logic  [X*Y-1:0][1:0]   loc_in_ready,
  output logic  [X*Y-1:0]        loc_out_valid,
  output flit_t [X*Y-1:0]        loc_out_flit,
  input  logic  [X*Y-1:0][1:0]   loc_out_ready,
  output logic  [X*Y-1:0]        gt_first
);

  logic  [X*Y-1:0][N_PORTS-1:0]       in_valid, out_valid;
  flit_t [X*Y-1:0][N_PORTS-1:0]       in_flit, out_flit;
  logic  [X*Y-1:0][N_PORTS-1:0][1:0]  in_ready, out_ready;
  logic  [X*Y-1:0][N_PORTS-1:0]       gtf;

  for (genvar y = 0; y < Y; y++) begin : g_y
    for (genvar x = 0; x < X; x++) begin : g_x
      localparam int N = y * X + x;

      noc_router #(.DEPTH(DEPTH)) u_r (
        .clk, .rst,
        .my_x      (4'(x)),
        .my_y      (4'(y)),
        .in_valid  (in_valid[N]),
        .in_flit   (in_flit[N]),
        .in_ready  (in_ready[N]),
        .out_valid (out_valid[N]),
        .out_flit  (out_flit[N]),
        .out_ready (out_ready[N]),
        .gt_first  (gtf[N])
      );
      assign gt_first[N] = |gtf[N];

      // local port
      assign in_valid[N][P_LOCAL]  = loc_in_valid[N];
      assign in_flit[N][P_LOCAL]   = loc_in_flit[N];
      assign loc_in_ready[N]       = in_ready[N][P_LOCAL];
      assign loc_out_valid[N]      = out_valid[N][P_LOCAL];
      assign loc_out_flit[N]       = out_flit[N][P_LOCAL];
      assign out_ready[N][P_LOCAL] = loc_out_ready[N];

      // east link: to (x+1, y) west input
      if (x < X - 1) begin : g_e
        assign in_valid[N][P_EAST]  = out_valid[N+1][P_WEST];
        assign in_flit[N][P_EAST]   = out_flit[N+1][P_WEST];
        assign out_ready[N][P_EAST] = in_ready[N+1][P_WEST];
      end else begin : g_e_edge
        assign in_valid[N][P_EAST]  = 1'b0;
        assign in_flit[N][P_EAST]   = '0;
        assign out_ready[N][P_EAST] = 2'b00;
      end
      // west link
      if (x > 0) begin : g_w
        assign in_valid[N][P_WEST]  = out_valid[N-1][P_EAST];
        assign in_flit[N][P_WEST]   = out_flit[N-1][P_EAST];
        assign out_ready[N][P_WEST] = in_ready[N-1][P_EAST];
      end else begin : g_w_edge
        assign in_valid[N][P_WEST]  = 1'b0;
        assign in_flit[N][P_WEST]   = '0;
        assign out_ready[N][P_WEST] = 2'b00;
      end
      // south link: to (x, y+1)
      if (y < Y - 1) begin : g_s
        assign in_valid[N][P_SOUTH]  = out_valid[N+X][P_NORTH];
        assign in_flit[N][P_SOUTH]   = out_flit[N+X][P_NORTH];
        assign out_ready[N][P_SOUTH] = in_ready[N+X][P_NORTH];
      end else begin : g_s_edge
        assign in_valid[N][P_SOUTH]  = 1'b0;
        assign in_flit[N][P_SOUTH]   = '0;
        assign out_ready[N][P_SOUTH] = 2'b00;
      end
      // north link
      if (y > 0) begin : g_n
        assign in_valid[N][P_NORTH]  = out_valid[N-X][P_SOUTH];
        assign in_flit[N][P_NORTH]   = out_flit[N-X][P_SOUTH];
        assign out_ready[N][P_NORTH] = in_ready[N-X][P_SOUTH];
      end else begin : g_n_edge
        assign in_valid[N][P_NORTH]  = 1'b0;
        assign in_flit[N][P_NORTH]   = '0;
        assign out_ready[N][P_NORTH] = 2'b00;
      end
    end
  end

endmodule
