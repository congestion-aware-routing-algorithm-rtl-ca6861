// tb_router: one router at (1,1) of a 4 x 4 mesh, with byte-channel models
// on all five ports. Checks:
//   * a flit crosses in 17 cycles (first byte in to last byte out) and leaves
//     on the port given by the destination, with the router's own
//     congestion byte in place of the one it arrived with;
//   * a congestion byte arriving from a neighbour lands in the table: the
//     neighbour's status shows up in the next flit's congestion byte;
//   * the routing decision uses the table: with north congested, flits for
//     (2,2) and (0,2) avoid north; with nothing congested a tie goes along x;
//   * two flits for the same output at the same time both arrive, the second
//     8 cycles after the first;
//   * a flit for (1,1) itself leaves on the local port.
module tb_router;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t             in_l   [NPORTS];
  logic              in_rdy [NPORTS];
  link_t             out_l  [NPORTS];
  logic              out_rdy[NPORTS];
  logic [NPORTS-1:0] dec_valid;
  dir_e              dec_dir  [NPORTS];
  rc_case_e          dec_case [NPORTS];
  logic [INFO_W-1:0] info;
  logic              congested;
  logic [CNT_W:0]    avg;

  router #(.X(1), .Y(1)) dut (
    .clk, .rst_n,
    .in_i        (in_l),
    .in_ready_o  (in_rdy),
    .out_o       (out_l),
    .out_ready_i (out_rdy),
    .dec_valid_o (dec_valid),
    .dec_dir_o   (dec_dir),
    .dec_case_o  (dec_case),
    .info_o      (info),
    .congested_o (congested),
    .avg_o       (avg)
  );

  int checks = 0;
  int failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  flit_t  txq   [NPORTS][$];
  flit_t  rxq   [NPORTS][$];
  longint rxt   [NPORTS][$];
  longint t_in  [NPORTS];
  logic   drv_busy [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    logic  busy;
    int    idx;
    flit_t cur;
    flit_t rbuf;
    int    ridx;
    assign in_l[p].valid = busy;
    assign in_l[p].data  = cur[idx*CH_W +: CH_W];
    assign out_rdy[p]    = 1'b1;
    assign drv_busy[p]   = busy;

    always @(posedge clk) begin
      if (!rst_n) begin
        busy <= 1'b0;
        idx  <= 0;
        cur  <= '0;
      end else if (busy) begin
        if (in_rdy[p]) begin
          if (idx == 0) t_in[p] = cycle;
          if (idx == FLIT_BYTES - 1) busy <= 1'b0;
          else idx <= idx + 1;
        end
      end else if (txq[p].size() > 0) begin
        cur  <= txq[p].pop_front();
        busy <= 1'b1;
        idx  <= 0;
      end
    end

    always @(posedge clk) begin
      if (!rst_n) begin
        ridx = 0;
        rbuf = '0;
      end else if (out_l[p].valid) begin
        rbuf[ridx*CH_W +: CH_W] = out_l[p].data;
        if (ridx == FLIT_BYTES - 1) begin
          rxq[p].push_back(rbuf);
          rxt[p].push_back(cycle);
          ridx = 0;
        end else begin
          ridx++;
        end
      end
    end
  end

  function automatic flit_t mk(int dx, int dy, cong_t c);
    flit_t f;
    f      = flit_t'({$urandom, $urandom});
    f.dst  = '{x: coord_t'(dx), y: coord_t'(dy)};
    f.cong = c;
    return f;
  endfunction

  task automatic settle();
    int t = 0;
    bit b;
    do begin
      @(posedge clk);
      t++;
      b = 0;
      for (int p = 0; p < NPORTS; p++) if (drv_busy[p] || txq[p].size() != 0) b = 1;
    end while (b && t < 500);
    repeat (25) @(posedge clk);
  endtask

  // send one flit on port pin, expect it on port pout; returns it as received
  task automatic one(int pin, int pout, flit_t f, output flit_t got, output longint lat);
    txq[pin].push_back(f);
    settle();
    chk(rxq[pout].size() == 1, $sformatf("flit from port %0d leaves on port %0d", pin, pout));
    for (int p = 0; p < NPORTS; p++)
      if (p != pout) chk(rxq[p].size() == 0, "nothing on other ports");
    got = '0;
    lat = 0;
    if (rxq[pout].size() > 0) begin
      got = rxq[pout].pop_front();
      lat = rxq[pout].size() == 0 ? rxt[pout].pop_front() - t_in[pin] : 0;
      chk({got.last, got.seq, got.data, got.dst, got.src} ==
          {f.last, f.seq, f.data, f.dst, f.src}, "payload and addresses unchanged");
    end
    for (int p = 0; p < NPORTS; p++) begin
      rxq[p].delete();
      rxt[p].delete();
    end
  endtask

  initial begin
    flit_t  f, g;
    longint lat;
    cong_t  c;
    for (int p = 0; p < NPORTS; p++) t_in[p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // straight through, west to east
    f = mk(3, 1, '{nbr_status: 4'b0000, delay_info: 4'd3});
    one(DIR_W, DIR_E, f, g, lat);
    chk(lat == 17, $sformatf("router latency 17 (got %0d)", lat));
    chk(g.cong == '{nbr_status: 4'b0000, delay_info: 4'd0}, "own congestion byte");

    // a congested neighbour to the north tells us through its flit
    c = '{nbr_status: 4'b0101, delay_info: 4'd12};
    f = mk(1, 0, c);
    one(DIR_N, DIR_S, f, g, lat);
    chk(dut.u_citb.rows_o[DIR_N] == c, "CITb row north written");
    f = mk(1, 3, '0);
    one(DIR_S, DIR_N, f, g, lat);
    chk(g.cong.nbr_status == 4'b0001, "north neighbour reported congested");

    // routing around the congested north
    f = mk(2, 2, '0);
    one(DIR_L, DIR_E, f, g, lat);
    f = mk(0, 2, '0);
    one(DIR_L, DIR_W, f, g, lat);
    // north recovers: a tie between east and south goes along x
    f = mk(1, 3, '{nbr_status: 4'b0000, delay_info: 4'd0});
    one(DIR_N, DIR_N, f, g, lat);
    f = mk(2, 0, '0);
    one(DIR_L, DIR_E, f, g, lat);

    // local delivery
    f = mk(1, 1, '0);
    one(DIR_E, DIR_L, f, g, lat);

    // two flits for the east port at once
    txq[DIR_W].push_back(mk(3, 1, '0));
    txq[DIR_S].push_back(mk(2, 1, '0));
    settle();
    chk(rxq[DIR_E].size() == 2, "both contending flits delivered");
    if (rxq[DIR_E].size() == 2)
      chk(rxt[DIR_E][1] - rxt[DIR_E][0] == 8, "second flit follows after 8 cycles");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
