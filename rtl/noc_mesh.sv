// noc_mesh: MESH_X x MESH_Y mesh network on chip of congestion-aware routers
// (4 x 4 by default, as in the design).
//
// Router (x, y) has address {y, x} (one nibble each) and sits at node index
// y*MESH_X + x. Its north port connects to the south port of (x, y+1) and its
// east port to the west port of (x+1, y), with an 8-bit channel and a ready
// wire in each direction. Corner routers thus have two neighbours, boundary
// routers three and centre routers four; ports facing the edge are tied off.
// The local port of every router is brought out for a processing element,
// which injects and ejects whole 64-bit flits as eight bytes.
//
// Congestion information travels only inside the flits: each router stores the
// congestion byte of every flit it receives from a neighbour in its table and
// writes its own into every flit it sends. There is no separate congestion
// network.
//
// Interface: pe_in_i / pe_in_ready_o carry flits from processing element n
// into its router, pe_out_o / pe_out_ready_i from the router to the
// processing element. info_o, congested_o and avg_o expose each router's
// congestion state; dec_* report each router's routing decisions (see
// router). Reset is asynchronous, active low.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X      = 4,
  parameter int unsigned MESH_Y      = 4,
  parameter int unsigned DELAY_SHIFT = 3,
  parameter int unsigned AVG_SHIFT   = 3,
  localparam int unsigned NODES      = MESH_X * MESH_Y
) (
  input  logic              clk,
  input  logic              rst_n,
  input  link_t             pe_in_i        [NODES],
  output logic              pe_in_ready_o  [NODES],
  output link_t             pe_out_o       [NODES],
  input  logic              pe_out_ready_i [NODES],
  output logic [INFO_W-1:0] info_o         [NODES],
  output logic              congested_o    [NODES],
  output logic [CNT_W:0]    avg_o          [NODES],
  output logic [NPORTS-1:0] dec_valid_o    [NODES],
  output dir_e              dec_dir_o      [NODES][NPORTS],
  output rc_case_e          dec_case_o     [NODES][NPORTS]
);

  link_t r_in     [NODES][NPORTS];
  logic  r_in_rdy [NODES][NPORTS];
  link_t r_out    [NODES][NPORTS];
  logic  r_out_rdy[NODES][NPORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      // north side
      if (y < MESH_Y - 1) begin : g_n
        assign r_in[N][DIR_N]      = r_out[N + MESH_X][DIR_S];
        assign r_out_rdy[N][DIR_N] = r_in_rdy[N + MESH_X][DIR_S];
      end else begin : g_n_edge
        assign r_in[N][DIR_N]      = '0;
        assign r_out_rdy[N][DIR_N] = 1'b0;
      end
      // south side
      if (y > 0) begin : g_s
        assign r_in[N][DIR_S]      = r_out[N - MESH_X][DIR_N];
        assign r_out_rdy[N][DIR_S] = r_in_rdy[N - MESH_X][DIR_N];
      end else begin : g_s_edge
        assign r_in[N][DIR_S]      = '0;
        assign r_out_rdy[N][DIR_S] = 1'b0;
      end
      // east side
      if (x < MESH_X - 1) begin : g_e
        assign r_in[N][DIR_E]      = r_out[N + 1][DIR_W];
        assign r_out_rdy[N][DIR_E] = r_in_rdy[N + 1][DIR_W];
      end else begin : g_e_edge
        assign r_in[N][DIR_E]      = '0;
        assign r_out_rdy[N][DIR_E] = 1'b0;
      end
      // west side
      if (x > 0) begin : g_w
        assign r_in[N][DIR_W]      = r_out[N - 1][DIR_E];
        assign r_out_rdy[N][DIR_W] = r_in_rdy[N - 1][DIR_E];
      end else begin : g_w_edge
        assign r_in[N][DIR_W]      = '0;
        assign r_out_rdy[N][DIR_W] = 1'b0;
      end
      // local port
      assign r_in[N][DIR_L]      = pe_in_i[N];
      assign pe_in_ready_o[N]    = r_in_rdy[N][DIR_L];
      assign pe_out_o[N]         = r_out[N][DIR_L];
      assign r_out_rdy[N][DIR_L] = pe_out_ready_i[N];

      router #(
        .X           (x),
        .Y           (y),
        .MESH_X      (MESH_X),
        .MESH_Y      (MESH_Y),
        .DELAY_SHIFT (DELAY_SHIFT),
        .AVG_SHIFT   (AVG_SHIFT)
      ) u_router (
        .clk,
        .rst_n,
        .in_i        (r_in[N]),
        .in_ready_o  (r_in_rdy[N]),
        .out_o       (r_out[N]),
        .out_ready_i (r_out_rdy[N]),
        .dec_valid_o (dec_valid_o[N]),
        .dec_dir_o   (dec_dir_o[N]),
        .dec_case_o  (dec_case_o[N]),
        .info_o      (info_o[N]),
        .congested_o (congested_o[N]),
        .avg_o       (avg_o[N])
      );
    end
  end

endmodule
