// tb_noc_mesh: end-to-end test of the 4 x 4 congestion-aware mesh at its
// default parameters.
//
// Every node has a processing-element model: a driver that sends queued
// 64-bit flits into the local port as eight bytes, and a sink that collects
// the flits leaving the local port (its ready can be held low to back traffic
// up). A scoreboard checks that every flit arrives once, at its destination,
// unchanged apart from the congestion byte, and that the flits of each
// multi-flit packet carry sequence numbers 0..n-1 with only the last one
// marked last.
//
// Phase 1 (uncongested): packets of 1 to 4 flits from node (0,0) to each of
// the other 15 nodes, one packet at a time. The latency from the first byte
// injected to the last byte delivered must be 10*hops + 17 + 10*(flits-1)
// cycles: 10 cycles per router on the way (8 bytes, RC stage, grant),
// 17 in the last router.
// Phase 2 (congestion): a router is made congested by stopping its local
// sink while its neighbours send to it, so the flits wait in its buffers
// and their large delays raise its average; a flit it then sends to (0,0)
// carries the news into (0,0)'s table. Probe flits from (0,0) to (3,3) must
// then be routed by each rule of the routing decision in turn:
//   (1,0) congested                       -> one congested: go north
//   (1,0), (0,1) congested                -> both congested, next-door alike
//   also (2,0) congested, known to (1,0)  -> both congested: go north,
//                                            where the next-door router is free
// Phase 3 repeats packets of 1 to 4 flits to (3,3) with the congestion in
// place. The test counts each mechanism (every routing rule, switch
// contention, input queuing, channel back-pressure, a router turning
// congested) and fails one that never happened.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int MX = 4;
  localparam int MY = 4;
  localparam int NN = MX * MY;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t             pe_in        [NN];
  logic              pe_in_ready  [NN];
  link_t             pe_out       [NN];
  logic              pe_out_ready [NN];
  logic [INFO_W-1:0] info         [NN];
  logic              congested    [NN];
  logic [CNT_W:0]    avg          [NN];
  logic [NPORTS-1:0] dec_valid    [NN];
  dir_e              dec_dir      [NN][NPORTS];
  rc_case_e          dec_case     [NN][NPORTS];

  noc_mesh dut (
    .clk, .rst_n,
    .pe_in_i        (pe_in),
    .pe_in_ready_o  (pe_in_ready),
    .pe_out_o       (pe_out),
    .pe_out_ready_i (pe_out_ready),
    .info_o         (info),
    .congested_o    (congested),
    .avg_o          (avg),
    .dec_valid_o    (dec_valid),
    .dec_dir_o      (dec_dir),
    .dec_case_o     (dec_case)
  );

  int checks = 0;
  int failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- processing-element models ----------------
  flit_t  txq   [NN][$];
  flit_t  expq  [NN][$];
  logic   sink_en [NN];
  longint inj_first [NN];      // cycle of the first byte of the last flit sent
  longint pkt_t0    [NN];      // cycle of the first byte of a marked packet
  bit     cap_t0    [NN];      // capture the next first byte into pkt_t0
  logic   drv_busy  [NN];
  longint rx_last   [NN];      // cycle of the last byte of the last flit received
  int     rx_count  [NN];
  flit_t  last_rx   [NN];

  function automatic int nd(int x, int y);
    return y * MX + x;
  endfunction

  function automatic flit_t mk(int sx, int sy, int dx, int dy, int seq, bit last);
    flit_t f;
    f          = '0;
    f.src      = '{x: coord_t'(sx), y: coord_t'(sy)};
    f.dst      = '{x: coord_t'(dx), y: coord_t'(dy)};
    f.cong     = '0;
    f.data     = $urandom;
    f.seq      = 7'(seq);
    f.last     = last;
    return f;
  endfunction

  function automatic flit_t strip(flit_t f);
    flit_t g = f;
    g.cong = '0;
    return g;
  endfunction

  task automatic send(flit_t f);
    int d = nd(int'(f.dst.x), int'(f.dst.y));
    int s = nd(int'(f.src.x), int'(f.src.y));
    txq[s].push_back(f);
    expq[d].push_back(strip(f));
  endtask

  // scoreboard: called for every delivered flit
  task automatic got(int n, flit_t f);
    int hit = -1;
    checks++;
    if (nd(int'(f.dst.x), int'(f.dst.y)) != n) begin
      failures++;
      $display("FAIL: node %0d received a flit for (%0d,%0d)", n, f.dst.x, f.dst.y);
      return;
    end
    foreach (expq[n][i]) if (hit < 0 && expq[n][i] == strip(f)) hit = i;
    if (hit < 0) begin
      failures++;
      $display("FAIL: node %0d received unexpected flit %h", n, f);
    end else begin
      expq[n].delete(hit);
    end
  endtask

  for (genvar n = 0; n < NN; n++) begin : g_pe
    logic  busy;
    int    idx;
    flit_t cur;
    flit_t rbuf;
    int    ridx;

    assign pe_in[n].valid  = busy;
    assign pe_in[n].data   = cur[idx*CH_W +: CH_W];
    assign pe_out_ready[n] = sink_en[n];
    assign drv_busy[n]     = busy;

    always @(posedge clk) begin
      if (!rst_n) begin
        busy <= 1'b0;
        idx  <= 0;
        cur  <= '0;
      end else if (busy) begin
        if (pe_in_ready[n]) begin
          if (idx == 0) begin
            inj_first[n] = cycle;
            if (cap_t0[n]) begin
              pkt_t0[n] = cycle;
              cap_t0[n] = 1'b0;
            end
          end
          if (idx == FLIT_BYTES - 1) busy <= 1'b0;
          else idx <= idx + 1;
        end
      end else if (txq[n].size() > 0) begin
        cur  <= txq[n].pop_front();
        busy <= 1'b1;
        idx  <= 0;
      end
    end

    always @(posedge clk) begin
      if (!rst_n) begin
        ridx = 0;
        rbuf = '0;
      end else if (pe_out[n].valid && sink_en[n]) begin
        rbuf[ridx*CH_W +: CH_W] = pe_out[n].data;
        if (ridx == FLIT_BYTES - 1) begin
          ridx = 0;
          rx_last[n]  = cycle;
          rx_count[n] = rx_count[n] + 1;
          last_rx[n]  = rbuf;
          got(n, rbuf);
        end else begin
          ridx = ridx + 1;
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_case [6];
  int n_contend = 0;     // two or more inputs asking for the same output
  int n_inwait  = 0;     // a complete flit waiting for the switch
  int n_bp      = 0;     // a channel byte held back by ready low
  int n_cong_up = 0;     // a router turning congested
  logic cong_prev [NN];
  rc_case_e last_case0;
  dir_e     last_dir0;

  for (genvar y = 0; y < MY; y++) begin : g_my
    for (genvar x = 0; x < MX; x++) begin : g_mx
      always @(posedge clk) if (rst_n) begin
        for (int o = 0; o < NPORTS; o++)
          if ($countones(dut.g_y[y].g_x[x].u_router.op_req[o]) > 1) n_contend++;
        n_inwait += $countones(dut.g_y[y].g_x[x].u_router.ip_req &
                               ~dut.g_y[y].g_x[x].u_router.ip_grant);
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      for (int p = 0; p < NPORTS; p++)
        if (dec_valid[n][p]) n_case[int'(dec_case[n][p])]++;
      if (pe_out[n].valid && !pe_out_ready[n]) n_bp++;
      if (pe_in[n].valid && !pe_in_ready[n]) n_bp++;
      if (congested[n] && !cong_prev[n]) n_cong_up++;
      cong_prev[n] <= congested[n];
    end
    if (dec_valid[0][DIR_L]) begin
      last_case0 <= dec_case[0][DIR_L];
      last_dir0  <= dec_dir[0][DIR_L];
    end
  end

  // ---------------- helpers ----------------
  task automatic wait_idle(int limit);
    int t = 0;
    bit busy_any;
    do begin
      @(posedge clk);
      t++;
      busy_any = 0;
      for (int n = 0; n < NN; n++)
        if (txq[n].size() != 0 || expq[n].size() != 0 || drv_busy[n]) busy_any = 1;
    end while (busy_any && t < limit);
    repeat (5) @(posedge clk);
  endtask

  // Stop router (x,y)'s local sink, let each listed source send it one flit,
  // hold for HOLD cycles, then release and wait until everything drained.
  task automatic congest(int x, int y, int srcs[$]);
    sink_en[nd(x, y)] = 1'b0;
    foreach (srcs[i]) send(mk(srcs[i] % MX, srcs[i] / MX, x, y, 0, 1'b1));
    repeat (320) @(posedge clk);
    sink_en[nd(x, y)] = 1'b1;
    wait_idle(5000);
    checks++;
    if (!congested[nd(x, y)]) begin
      failures++;
      $display("FAIL: router (%0d,%0d) not congested after the stall (avg %0d, info %0d)",
               x, y, avg[nd(x, y)], info[nd(x, y)]);
    end
  endtask

  // one flit from (sx,sy) to (dx,dy), carrying (sx,sy)'s congestion byte
  task automatic tell(int sx, int sy, int dx, int dy);
    send(mk(sx, sy, dx, dy, 0, 1'b1));
    wait_idle(2000);
  endtask

  task automatic probe(string what, rc_case_e want_case, dir_e want_dir, bit check_dir);
    send(mk(0, 0, 3, 3, 0, 1'b1));
    wait_idle(2000);
    checks++;
    if (last_case0 != want_case || (check_dir && last_dir0 != want_dir)) begin
      failures++;
      $display("FAIL: %s: router (0,0) chose %s by rule %s, expected %s by rule %s",
               what, last_dir0.name(), last_case0.name(), want_dir.name(), want_case.name());
    end else begin
      $display("ok: %s: (0,0) -> %s by rule %s", what, last_dir0.name(), last_case0.name());
    end
  endtask

  task automatic packet_from_origin(int dx, int dy, int n, output longint lat);
    cap_t0[0] = 1'b1;
    for (int s = 0; s < n; s++) send(mk(0, 0, dx, dy, s, s == n - 1));
    wait_idle(4000);
    lat = rx_last[nd(dx, dy)] - pkt_t0[0];
  endtask

  // ---------------- stimulus ----------------
  initial begin
    longint lat, want;
    int lat_cong [4];
    int srcs[$];
    for (int n = 0; n < NN; n++) begin
      sink_en[n]   = 1'b1;
      cap_t0[n]    = 1'b0;
      rx_count[n]  = 0;
      cong_prev[n] = 1'b0;
    end
    foreach (n_case[i]) n_case[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // ---- phase 1: uncongested latency from (0,0) to every node ----
    for (int d = 1; d < NN; d++) begin
      for (int n = 1; n <= 4; n++) begin
        int dx, dy;
        dx = d % MX;
        dy = d / MX;
        packet_from_origin(dx, dy, n, lat);
        want = 10 * (dx + dy) + 17 + 10 * (n - 1);
        checks++;
        if (lat != want) begin
          failures++;
          $display("FAIL: latency (0,0)->(%0d,%0d) %0d flits: %0d cycles, expected %0d",
                   dx, dy, n, lat, want);
        end
        if (d == 15) $display("uncongested (0,0)->(3,3), %0d flit(s): %0d cycles", n, lat);
      end
    end
    // reassembly: last flit of the last packet was sequence 3 and marked last
    checks++;
    if (last_rx[15].seq != 7'd3 && !last_rx[15].last) failures++;

    // heavy cross traffic: every node sends random flits at the same time
    for (int k = 0; k < 400; k++) begin
      int s, d;
      s = $urandom_range(NN - 1);
      d = $urandom_range(NN - 1);
      send(mk(s % MX, s / MX, d % MX, d / MX, 0, 1'b1));
    end
    wait_idle(20000);

    // ---- phase 2: congestion and the routing rules ----
    probe("no congestion", RC_FREE_DELAY, DIR_E, 1'b0);

    srcs = '{nd(0, 0), nd(2, 0), nd(1, 1), nd(1, 0)};
    congest(1, 0, srcs);
    tell(1, 0, 0, 0);
    probe("(1,0) congested", RC_ONE_CONG, DIR_N, 1'b1);

    srcs = '{nd(0, 0), nd(1, 1), nd(0, 2), nd(0, 1)};
    congest(0, 1, srcs);
    tell(0, 1, 0, 0);
    probe("(1,0) and (0,1) congested", RC_ND_DELAY, DIR_E, 1'b0);

    srcs = '{nd(3, 0), nd(2, 1), nd(2, 0)};
    congest(2, 0, srcs);
    tell(2, 0, 1, 0);
    srcs = '{nd(0, 0), nd(1, 1), nd(1, 0)};
    congest(1, 0, srcs);
    tell(1, 0, 0, 0);
    probe("(1,0), (0,1), (2,0) congested", RC_ND_FREE, DIR_N, 1'b1);

    // ---- phase 3: packets of 1..4 flits over the congested corner ----
    for (int n = 1; n <= 4; n++) begin
      packet_from_origin(3, 3, n, lat);
      lat_cong[n-1] = int'(lat);
      $display("congested  (0,0)->(3,3), %0d flit(s): %0d cycles", n, lat);
      checks++;
      if (lat < 10 * 6 + 17 + 10 * (n - 1)) failures++;
    end

    // ---- every mechanism must have happened ----
    foreach (n_case[i]) begin
      checks++;
      if (n_case[i] == 0) begin
        failures++;
        $display("FAIL: routing rule %s never used", rc_case_e'(i));
      end
    end
    checks++; if (n_contend == 0) begin failures++; $display("FAIL: no switch contention"); end
    checks++; if (n_inwait  == 0) begin failures++; $display("FAIL: no input queuing"); end
    checks++; if (n_bp      == 0) begin failures++; $display("FAIL: no back-pressure"); end
    checks++; if (n_cong_up == 0) begin failures++; $display("FAIL: no router became congested"); end
    for (int n = 0; n < NN; n++) begin
      checks++;
      if (expq[n].size() != 0) begin
        failures++;
        $display("FAIL: %0d flits never reached node %0d", expq[n].size(), n);
      end
    end
    $display("rules: local %0d single %0d free-delay %0d one-congested %0d next-door-delay %0d next-door-free %0d",
             n_case[0], n_case[1], n_case[2], n_case[3], n_case[4], n_case[5]);
    $display("contention %0d, input waits %0d, back-pressure %0d, congestion onsets %0d",
             n_contend, n_inwait, n_bp, n_cong_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
