// tile_noc_adapter: connects a Montium tile's word streams to a mesh router
// local port, turning packets into words and words into packets.
//
// Receive side: a head flit is consumed by the adapter itself; it records
// the packet's class and its source coordinates, which become the reply
// address. The payload flits that follow are passed to the tile one word
// per cycle until the tail. While a packet of one class is being passed on,
// the other class is held back (its ready is low), so the tile sees whole
// messages. A one-flit packet (head and tail together) carries no payload.
//
// Transmit side: words from the tile go back to the sender of the most
// recently received packet, in that packet's class. A word is held in a
// one-word lookahead register; when the first word arrives, a head flit
// {reply x, reply y, own x, own y} is sent, then the words. A word is sent
// as the tail when no further word is waiting behind it or when the packet
// has reached MAX_WORDS payload words, so replies leave as soon as they
// exist and long streams are cut into bounded packets.
//
// Interface: clk/rst (network clock, synchronous active-high reset); my_x,
// my_y; net_in_* from the router local output, net_out_* into the router
// local input (ready per class, index 0 BE, 1 GT); rx_* and tx_* towards
// the tile's network-side ports (valid/ready/data). All ready outputs depend
// only on registered state and on ready inputs, never on valid inputs.
//
// Follows the document: the tile reaches the network through a network
// interface, and GT and BE are the two traffic classes. MAX_WORDS defaults
// to 128 16-bit words, the GT packet size ("the GT packets are larger (256
// bytes) than the BE packets (10 bytes)"); using it for every packet is this
// design's choice. The packet format and reply addressing: not mentioned.
module tile_noc_adapter
  import noc_pkg::*;
#(
  parameter int MAX_WORDS = 128
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  my_x,
  input  logic [3:0]  my_y,
  // from the network
  input  logic        net_in_valid,
  input  flit_t       net_in_flit,
  output logic [1:0]  net_in_ready,
  // to the network
  output logic        net_out_valid,
  output flit_t       net_out_flit,
  input  logic [1:0]  net_out_ready,
  // to the tile
  output logic        rx_valid,
  output logic [15:0] rx_data,
  input  logic        rx_ready,
  // from the tile
  input  logic        tx_valid,
  input  logic [15:0] tx_data,
  output logic        tx_ready
);

  localparam int CW = $clog2(MAX_WORDS + 1);

  // ------------------------------------------------------------- receive
  logic    rx_busy;
  tclass_t rx_cls, reply_cls;
  logic [3:0] reply_x, reply_y;
  logic    in_take;

  always_comb begin
    for (int c = 0; c < 2; c++)
      net_in_ready[c] = rx_busy ? (rx_cls == tclass_t'(c) && rx_ready) : 1'b1;
  end
  assign in_take  = net_in_valid && net_in_ready[net_in_flit.cls];
  assign rx_valid = net_in_valid && rx_busy && net_in_flit.cls == rx_cls && !net_in_flit.head;
  assign rx_data  = net_in_flit.data;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_busy   <= 1'b0;
      rx_cls    <= BE;
      reply_cls <= BE;
      reply_x   <= '0;
      reply_y   <= '0;
    end else if (in_take) begin
      if (net_in_flit.head) begin
        rx_busy   <= !net_in_flit.tail;
        rx_cls    <= net_in_flit.cls;
        reply_cls <= net_in_flit.cls;
        reply_x   <= net_in_flit.data[7:4];
        reply_y   <= net_in_flit.data[3:0];
      end else if (net_in_flit.tail) begin
        rx_busy <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------ transmit
  logic          hold_v, in_pkt;
  logic [15:0]   hold_d;
  logic [CW-1:0] n_sent;
  tclass_t       pkt_cls;
  logic          send, last;

  assign last = !tx_valid || n_sent == CW'(MAX_WORDS - 1);

  always_comb begin
    net_out_flit = '0;
    if (!in_pkt) begin
      net_out_flit.cls  = reply_cls;
      net_out_flit.head = 1'b1;
      net_out_flit.data = head_data(reply_x, reply_y, my_x, my_y);
    end else begin
      net_out_flit.cls  = pkt_cls;
      net_out_flit.tail = last;
      net_out_flit.data = hold_d;
    end
  end
  assign net_out_valid = hold_v;
  assign send          = hold_v && net_out_ready[net_out_flit.cls];
  assign tx_ready      = !hold_v || (send && in_pkt);

  always_ff @(posedge clk) begin
    if (rst) begin
      hold_v  <= 1'b0;
      hold_d  <= '0;
      in_pkt  <= 1'b0;
      n_sent  <= '0;
      pkt_cls <= BE;
    end else begin
      if (tx_valid && tx_ready) begin
        hold_v <= 1'b1;
        hold_d <= tx_data;
      end else if (send && in_pkt) begin
        hold_v <= 1'b0;
      end
      if (send) begin
        if (!in_pkt) begin
          in_pkt  <= 1'b1;
          n_sent  <= '0;
          pkt_cls <= reply_cls;
        end else if (last) begin
          in_pkt <= 1'b0;
        end else begin
          n_sent <= n_sent + 1'b1;
        end
      end
    end
  end

endmodule
