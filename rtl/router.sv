// router: five-port congestion-aware mesh router.
//
// Ports 0..3 connect to the north, east, west and south neighbours, port 4 to
// the local processing element; each has an 8-bit channel in each direction.
// A flit goes through these stages:
//   input_port    receive 8 bytes into a one-flit buffer; as the congestion
//                 byte goes by, store it in the CITb row of the sender
//   rc_unit       pick the output port from the destination and the CITb
//                 (one cycle after the flit is complete, then re-evaluated
//                 every cycle while the flit waits, so a waiting flit follows
//                 the newest table contents)
//   output_port   round-robin switch arbitration, copy into the one-flit
//                 output buffer with this router's congestion byte, send
//                 8 bytes
//   congestion_calc  average the total delay of the departing flits into the
//                 router's 4-bit delay information
// Without contention a flit spends 19 cycles in a router: 8 to arrive, 1 in
// the RC stage, 1 across the switch and 8 more to leave, plus 1 cycle between
// the last byte arriving and the grant (the request is registered state).
//
// Every flit carries its own addresses, so the flits of one packet are routed
// independently and may arrive out of order; the sequence number in the tail
// puts them back in order at the destination.
//
// Interface: in_i / in_ready_o and out_o / out_ready_i per port, indexed by
// noc_pkg::dir_e. Ports facing the mesh edge must be tied off (in valid low);
// minimal routing never sends a flit that way if all addresses are inside
// the MESH_X x MESH_Y mesh. The dec_* outputs report, per input port, the
// routing decision of the flit that crosses the switch in this cycle; info_o,
// congested_o and avg_o show the router's congestion state. Reset is
// asynchronous, active low.
module router
  import noc_pkg::*;
#(
  parameter int unsigned X           = 0,
  parameter int unsigned Y           = 0,
  parameter int unsigned MESH_X      = 4,
  parameter int unsigned MESH_Y      = 4,
  parameter int unsigned DELAY_SHIFT = 3,
  parameter int unsigned AVG_SHIFT   = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  link_t             in_i        [NPORTS],
  output logic              in_ready_o  [NPORTS],
  output link_t             out_o       [NPORTS],
  input  logic              out_ready_i [NPORTS],
  output logic [NPORTS-1:0] dec_valid_o,
  output dir_e              dec_dir_o   [NPORTS],
  output rc_case_e          dec_case_o  [NPORTS],
  output logic [INFO_W-1:0] info_o,
  output logic              congested_o,
  output logic [CNT_W:0]    avg_o
);

  localparam addr_t HERE = '{x: coord_t'(X), y: coord_t'(Y)};

  // input side
  logic              ip_cong_valid [NPORTS];
  cong_t             ip_cong       [NPORTS];
  flit_t             ip_flit       [NPORTS];
  delay_t            ip_delay      [NPORTS];
  logic [NPORTS-1:0] ip_req;
  logic [NPORTS-1:0] ip_grant;

  // routing
  dir_e              rc_dir  [NPORTS];
  rc_case_e          rc_case [NPORTS];
  cit_entry_t        cit_rows [NDIRS];
  cit_entry_t        cit_wdata [NDIRS];
  logic [NDIRS-1:0]  cit_wr;
  logic [NDIRS-1:0]  nbr_cong;

  // output side
  logic [NPORTS-1:0] op_req   [NPORTS];
  logic [NPORTS-1:0] op_grant [NPORTS];
  logic [NPORTS-1:0] op_sample_valid;
  delay_t            op_sample [NPORTS];
  cong_t             own_cong;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    input_port u_in (
      .clk,
      .rst_n,
      .in_i         (in_i[p]),
      .in_ready_o   (in_ready_o[p]),
      .cong_valid_o (ip_cong_valid[p]),
      .cong_o       (ip_cong[p]),
      .flit_o       (ip_flit[p]),
      .delay_o      (ip_delay[p]),
      .req_o        (ip_req[p]),
      .grant_i      (ip_grant[p])
    );

    rc_unit u_rc (
      .cur_i  (HERE),
      .dst_i  (ip_flit[p].dst),
      .cit_i  (cit_rows),
      .dir_o  (rc_dir[p]),
      .case_o (rc_case[p])
    );
  end

  // the local port's congestion byte comes from a processing element, not a
  // router, and is not stored
  always_comb begin
    for (int d = 0; d < NDIRS; d++) begin
      cit_wr[d]    = ip_cong_valid[d];
      cit_wdata[d] = ip_cong[d];
    end
  end

  citb u_citb (
    .clk,
    .rst_n,
    .wr_i       (cit_wr),
    .wr_data_i  (cit_wdata),
    .rows_o     (cit_rows),
    .nbr_cong_o (nbr_cong)
  );

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int p = 0; p < NPORTS; p++)
        op_req[o][p] = ip_req[p] && (rc_dir[p] == dir_e'(o));
    for (int p = 0; p < NPORTS; p++) begin
      ip_grant[p] = 1'b0;
      for (int o = 0; o < NPORTS; o++) ip_grant[p] |= op_grant[o][p];
    end
  end

  assign own_cong = '{nbr_status: nbr_cong, delay_info: info_o};

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    output_port u_out (
      .clk,
      .rst_n,
      .req_i          (op_req[o]),
      .flit_i         (ip_flit),
      .delay_i        (ip_delay),
      .cong_i         (own_cong),
      .grant_o        (op_grant[o]),
      .out_o          (out_o[o]),
      .out_ready_i    (out_ready_i[o]),
      .sample_valid_o (op_sample_valid[o]),
      .sample_o       (op_sample[o])
    );
  end

  congestion_calc #(
    .NSAMPLES    (NPORTS),
    .DELAY_SHIFT (DELAY_SHIFT),
    .AVG_SHIFT   (AVG_SHIFT)
  ) u_cc (
    .clk,
    .rst_n,
    .sample_valid_i (op_sample_valid),
    .sample_i       (op_sample),
    .avg_o          (avg_o),
    .info_o         (info_o),
    .congested_o    (congested_o)
  );

  assign dec_valid_o = ip_grant;
  assign dec_dir_o   = rc_dir;
  assign dec_case_o  = rc_case;

  // minimal routing must stay inside the mesh
  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    a_in_mesh: assert property (@(posedge clk) disable iff (!rst_n)
      ip_req[p] |-> !((rc_dir[p] == DIR_N && Y == MESH_Y - 1) ||
                      (rc_dir[p] == DIR_S && Y == 0) ||
                      (rc_dir[p] == DIR_E && X == MESH_X - 1) ||
                      (rc_dir[p] == DIR_W && X == 0)));
  end

endmodule
