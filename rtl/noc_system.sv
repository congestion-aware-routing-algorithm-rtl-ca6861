// noc_system: the 4 x 4 congestion-aware mesh with a network interface at
// every node, the complete network as seen by the processing elements.
//
// Node n = y*MESH_X + x has a packetizer (ni_tx) that turns a packet of
// 32-bit words into numbered 64-bit flits for its router's local port, and a
// reassembler (ni_rx) that collects the flits arriving at the local port and
// hands each completed packet back in sequence order. Between them the
// routers of noc_mesh move each flit on its own, choosing at every hop
// between the x and y directions from the congestion information carried in
// the flits themselves.
//
// Interface, per node (arrays indexed by node):
//   pkt_valid_i / pkt_ready_o, pkt_dst_i, pkt_len_i   packet header
//   word_valid_i / word_ready_o, word_i               one word per flit
//   rx_valid_o / rx_ready_i, rx_src_o, rx_idx_o, rx_word_o, rx_last_o
//                                                     reassembled packets
//   info_o, congested_o                               router congestion state
// Reset is asynchronous, active low. Without contention a packet of n flits
// over h hops takes 10*h + 11*n + 9 cycles from the header being accepted to
// its last word being taken: 2 to accept the header and load the first word,
// 10 per hop, 17 in the destination router, 10 per further flit (the
// source's local input port takes a flit every 10 cycles) and n to stream
// the words out of the reassembler.
//
// The flit format has no packet number, so a source must not have two
// packets to the same destination in flight at once: flits routed on
// different paths could overtake each other and mix the two packets.
module noc_system
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned MAX_FLITS = 128,
  localparam int unsigned NODES    = MESH_X * MESH_Y,
  localparam int unsigned LEN_W    = $clog2(MAX_FLITS + 1),
  localparam int unsigned SEQ_W    = (MAX_FLITS > 1) ? $clog2(MAX_FLITS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pkt_valid_i  [NODES],
  output logic              pkt_ready_o  [NODES],
  input  addr_t             pkt_dst_i    [NODES],
  input  logic [LEN_W-1:0]  pkt_len_i    [NODES],
  input  logic              word_valid_i [NODES],
  output logic              word_ready_o [NODES],
  input  logic [31:0]       word_i       [NODES],
  output logic              rx_valid_o   [NODES],
  input  logic              rx_ready_i   [NODES],
  output addr_t             rx_src_o     [NODES],
  output logic [SEQ_W-1:0]  rx_idx_o     [NODES],
  output logic [31:0]       rx_word_o    [NODES],
  output logic              rx_last_o    [NODES],
  output logic [INFO_W-1:0] info_o       [NODES],
  output logic              congested_o  [NODES]
);

  link_t             pe_in        [NODES];
  logic              pe_in_ready  [NODES];
  link_t             pe_out       [NODES];
  logic              pe_out_ready [NODES];
  logic [CNT_W:0]    avg          [NODES];
  logic [NPORTS-1:0] dec_valid    [NODES];
  dir_e              dec_dir      [NODES][NPORTS];
  rc_case_e          dec_case     [NODES][NPORTS];

  noc_mesh #(
    .MESH_X (MESH_X),
    .MESH_Y (MESH_Y)
  ) u_mesh (
    .clk,
    .rst_n,
    .pe_in_i        (pe_in),
    .pe_in_ready_o  (pe_in_ready),
    .pe_out_o       (pe_out),
    .pe_out_ready_i (pe_out_ready),
    .info_o         (info_o),
    .congested_o    (congested_o),
    .avg_o          (avg),
    .dec_valid_o    (dec_valid),
    .dec_dir_o      (dec_dir),
    .dec_case_o     (dec_case)
  );

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      ni_tx #(
        .X         (x),
        .Y         (y),
        .MAX_FLITS (MAX_FLITS)
      ) u_tx (
        .clk,
        .rst_n,
        .pkt_valid_i  (pkt_valid_i[N]),
        .pkt_ready_o  (pkt_ready_o[N]),
        .pkt_dst_i    (pkt_dst_i[N]),
        .pkt_len_i    (pkt_len_i[N]),
        .word_valid_i (word_valid_i[N]),
        .word_ready_o (word_ready_o[N]),
        .word_i       (word_i[N]),
        .out_o        (pe_in[N]),
        .out_ready_i  (pe_in_ready[N])
      );

      ni_rx #(
        .MESH_X    (MESH_X),
        .MESH_Y    (MESH_Y),
        .MAX_FLITS (MAX_FLITS)
      ) u_rx (
        .clk,
        .rst_n,
        .in_i        (pe_out[N]),
        .in_ready_o  (pe_out_ready[N]),
        .out_valid_o (rx_valid_o[N]),
        .out_ready_i (rx_ready_i[N]),
        .out_src_o   (rx_src_o[N]),
        .out_idx_o   (rx_idx_o[N]),
        .out_word_o  (rx_word_o[N]),
        .out_last_o  (rx_last_o[N])
      );
    end
  end

endmodule
