// noc_router: five-port mesh router with a guaranteed-throughput and a
// best-effort virtual channel.
//
// Each input port has one FIFO per traffic class. Packets are routed
// dimension-ordered (first along x, then along y) from the destination in
// their head flit, and are switched wormhole style: an output channel of a
// class is locked to one input from head to tail, and different inputs
// competing for it are served round-robin, packet by packet, which is the
// fairness best-effort traffic gets. Each output link carries one flit per
// cycle; when both classes have a flit ready for the same link, the GT flit
// goes first. GT traffic therefore never waits for BE traffic, so its
// latency is bounded by the GT load alone, which the configuring processor
// controls when it sets up GT streams; BE traffic uses whatever bandwidth GT
// leaves. The two classes and their guarantees follow the source
// architecture; the router structure, routing and buffer depth are this
// design's choices.
//
// Link interface (per port): valid + flit forward, one ready bit per class
// backward; a flit of class c moves when valid is high and ready[c] is high.
//
// Assumptions. The document states the service, "For the GT traffic
// guaranteed latencies are supported", but not how the router provides it
// (its structure is not mentioned). Strict GT priority is this design's
// choice, and it behaves differently from the reported 6x6 results: there GT
// latency rises with BE load while staying under its bound ("the GT traffic
// utilizes the bandwidth unused by the BE traffic"), whereas here GT latency
// does not change with BE load at all. Routing, flit width (16 bits, the
// word size of the tiles) and FIFO depth: not mentioned.
// Ready depends only on FIFO occupancy, so no combinational path runs through
// a router from ready to ready. Synchronous active-high reset.
module noc_router
  import noc_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [3:0]                  my_x,
  input  logic [3:0]                  my_y,
  input  logic  [N_PORTS-1:0]         in_valid,
  input  flit_t [N_PORTS-1:0]         in_flit,
  output logic  [N_PORTS-1:0][1:0]    in_ready,
  output logic  [N_PORTS-1:0]         out_valid,
  output flit_t [N_PORTS-1:0]         out_flit,
  input  logic  [N_PORTS-1:0][1:0]    out_ready,
  output logic  [N_PORTS-1:0]         gt_first    // GT flit sent while a BE flit waited for the same link
);

  localparam int PW = 3;   // port index width

  // ------------------------------------------------------------ input VCs
  logic  [N_PORTS-1:0][1:0] q_valid, q_pop, q_wready;
  flit_t [N_PORTS-1:0][1:0] q_flit;
  logic  [N_PORTS-1:0][1:0][PW-1:0] route_reg, route_cur;

  function automatic logic [PW-1:0] xy_route(input logic [15:0] hd, input logic [3:0] x,
                                             input logic [3:0] y);
    logic [3:0] dx, dy;
    {dx, dy} = hd[15:8];   // the source coordinates in hd[7:0] do not affect routing
    if (dx > x)      return PW'(P_EAST);
    else if (dx < x) return PW'(P_WEST);
    else if (dy > y) return PW'(P_SOUTH);
    else if (dy < y) return PW'(P_NORTH);
    return PW'(P_LOCAL);
  endfunction

  for (genvar p = 0; p < N_PORTS; p++) begin : g_in
    for (genvar c = 0; c < 2; c++) begin : g_vc
      sync_fifo #(.DEPTH(DEPTH), .DW($bits(flit_t))) u_q (
        .clk, .rst,
        .wr_valid (in_valid[p] && in_flit[p].cls == tclass_t'(c)),
        .wr_ready (q_wready[p][c]),
        .wr_data  (in_flit[p]),
        .rd_valid (q_valid[p][c]),
        .rd_ready (q_pop[p][c]),
        .rd_data  (q_flit[p][c])
      );
      assign in_ready[p][c] = q_wready[p][c];
      assign route_cur[p][c] = q_flit[p][c].head ? xy_route(q_flit[p][c].data, my_x, my_y)
                                                 : route_reg[p][c];
      always_ff @(posedge clk) begin
        if (rst)                                      route_reg[p][c] <= '0;
        else if (q_pop[p][c] && q_flit[p][c].head)    route_reg[p][c] <= route_cur[p][c];
      end
    end
  end

  // ------------------------------------------------------- output channels
  logic [N_PORTS-1:0][1:0]          locked;
  logic [N_PORTS-1:0][1:0][PW-1:0]  owner, rr;
  logic [N_PORTS-1:0][1:0][PW-1:0]  cand;
  logic [N_PORTS-1:0][1:0]          cand_ok, can_send;
  logic [N_PORTS-1:0]               send_gt, send_be;

  always_comb begin
    int p;
    p        = 0;
    can_send = '0;
    send_gt  = '0;
    send_be  = '0;
    for (int o = 0; o < N_PORTS; o++) begin
      for (int c = 0; c < 2; c++) begin
        cand[o][c]    = owner[o][c];
        cand_ok[o][c] = 1'b0;
        if (locked[o][c]) begin
          cand_ok[o][c] = q_valid[owner[o][c]][c] && route_cur[owner[o][c]][c] == PW'(o);
        end else begin
          // round-robin among inputs whose head flit of class c wants output o
          for (int k = N_PORTS; k >= 1; k--) begin
            p = (int'(rr[o][c]) + k) % N_PORTS;
            if (q_valid[p][c] && q_flit[p][c].head && route_cur[p][c] == PW'(o)) begin
              cand[o][c]    = PW'(p);
              cand_ok[o][c] = 1'b1;
            end
          end
        end
        can_send[o][c] = cand_ok[o][c] && out_ready[o][c];
      end
      send_gt[o]   = can_send[o][GT];
      send_be[o]   = !can_send[o][GT] && can_send[o][BE];
      out_valid[o] = send_gt[o] || send_be[o];
      out_flit[o]  = send_gt[o] ? q_flit[cand[o][GT]][GT] : q_flit[cand[o][BE]][BE];
      gt_first[o]  = send_gt[o] && can_send[o][BE];
    end
    q_pop = '0;
    for (int o = 0; o < N_PORTS; o++) begin
      if (send_gt[o]) q_pop[cand[o][GT]][GT] = 1'b1;
      if (send_be[o]) q_pop[cand[o][BE]][BE] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      locked <= '0;
      owner  <= '0;
      rr     <= '0;
    end else begin
      for (int o = 0; o < N_PORTS; o++) begin
        for (int c = 0; c < 2; c++) begin
          if ((c == 1) ? send_gt[o] : send_be[o]) begin
            if (q_flit[cand[o][c]][c].tail) begin
              locked[o][c] <= 1'b0;
              rr[o][c]     <= cand[o][c];
            end else begin
              locked[o][c] <= 1'b1;
              owner[o][c]  <= cand[o][c];
            end
          end
        end
      end
    end
  end

endmodule
