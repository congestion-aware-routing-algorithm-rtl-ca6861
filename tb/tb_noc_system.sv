// tb_noc_system: the whole network, 4 x 4 routers with a packetizer and a
// reassembler at each node, at its default parameters.
//
// Workload 1 (route uncongested): node (0,0) sends packets of 1, 2, 3 and 4
// flits (4 data bytes each) to each of the other 15 nodes, one packet at a
// time. Each packet must come out of the destination's reassembler complete,
// in order and from source (0,0). Its latency, from the header being accepted
// to the last word being taken, must be 10*hops + 11*flits + 9 cycles:
//   2        header, first word loaded
//   10*hops  one router per hop (8 bytes, RC stage, switch)
//   17       the destination router
//   10*(n-1) one flit every 10 cycles at the source's local port
//   n        words streamed out of the reassembler
// Workload 2 (route congested): router (1,0) is made congested by holding
// its node's output stream while its neighbours send to it; a packet from
// (1,0) to (0,0) carries that into (0,0)'s table. Then (0,0) sends packets of
// 1 to 4 flits to every node off row 0. Every flit must leave (0,0)
// northwards (by the "one neighbour congested" rule where east was also
// productive) and arrive complete, and the latency must still be the
// uncongested one: the detour is itself a shortest path.
// Finally all 16 nodes send random packets at once (up to 6 flits each) and
// every packet must be reassembled correctly.
module tb_noc_system;
  import noc_pkg::*;

  localparam int NN = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              pkt_valid  [NN];
  logic              pkt_ready  [NN];
  addr_t             pkt_dst    [NN];
  logic [7:0]        pkt_len    [NN];
  logic              word_valid [NN];
  logic              word_ready [NN];
  logic [31:0]       word       [NN];
  logic              rx_valid   [NN];
  logic              rx_ready   [NN];
  addr_t             rx_src     [NN];
  logic [6:0]        rx_idx     [NN];
  logic [31:0]       rx_word    [NN];
  logic              rx_last    [NN];
  logic [INFO_W-1:0] info       [NN];
  logic              congested  [NN];

  noc_system dut (
    .clk, .rst_n,
    .pkt_valid_i  (pkt_valid),
    .pkt_ready_o  (pkt_ready),
    .pkt_dst_i    (pkt_dst),
    .pkt_len_i    (pkt_len),
    .word_valid_i (word_valid),
    .word_ready_o (word_ready),
    .word_i       (word),
    .rx_valid_o   (rx_valid),
    .rx_ready_i   (rx_ready),
    .rx_src_o     (rx_src),
    .rx_idx_o     (rx_idx),
    .rx_word_o    (rx_word),
    .rx_last_o    (rx_last),
    .info_o       (info),
    .congested_o  (congested)
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

  typedef struct {
    int          dst;
    int          len;
    logic [31:0] w [$];
  } pkt_t;

  pkt_t        txq  [NN][$];
  logic [31:0] expw [NN][NN][$];   // [destination][source] words in order
  int          pending = 0;        // packets not yet fully received
  longint      hdr_t   [NN];       // cycle the last header was accepted
  longint      done_t  [NN];       // cycle the last packet completed
  logic        sink_en [NN];
  logic        drv_busy [NN];

  for (genvar n = 0; n < NN; n++) begin : g_node
    pkt_t cur;
    int   k;
    int   st;   // 0 idle, 1 header, 2 words
    assign drv_busy[n] = (st != 0);
    assign rx_ready[n] = sink_en[n];

    always @(posedge clk) begin
      if (!rst_n) begin
        st            = 0;
        pkt_valid[n]  <= 1'b0;
        word_valid[n] <= 1'b0;
        pkt_dst[n]    <= '0;
        pkt_len[n]    <= '0;
        word[n]       <= '0;
      end else begin
        case (st)
          0: if (txq[n].size() > 0) begin
               cur           = txq[n].pop_front();
               pkt_valid[n]  <= 1'b1;
               pkt_dst[n]    <= '{x: coord_t'(cur.dst % 4), y: coord_t'(cur.dst / 4)};
               pkt_len[n]    <= 8'(cur.len);
               st            = 1;
             end
          1: if (pkt_ready[n]) begin
               hdr_t[n]      = cycle;
               pkt_valid[n]  <= 1'b0;
               k             = 0;
               word_valid[n] <= 1'b1;
               word[n]       <= cur.w[0];
               st            = 2;
             end
          default: if (word_ready[n]) begin
               k++;
               if (k == cur.len) begin
                 word_valid[n] <= 1'b0;
                 st            = 0;
               end else begin
                 word[n] <= cur.w[k];
               end
             end
        endcase
      end
    end

    always @(posedge clk) if (rst_n && rx_valid[n] && rx_ready[n]) begin
      int s;
      s = int'(rx_src[n].y) * 4 + int'(rx_src[n].x);
      chk(expw[n][s].size() > 0, $sformatf("node %0d: unexpected word from %0d", n, s));
      if (expw[n][s].size() > 0) chk(rx_word[n] == expw[n][s].pop_front(), "word value and order");
      if (rx_last[n]) begin
        pending--;
        done_t[n] = cycle;
      end
    end
  end

  task automatic send(int src, int dst, int len);
    pkt_t p;
    p.dst = dst;
    p.len = len;
    for (int i = 0; i < len; i++) begin
      p.w.push_back($urandom);
      expw[dst][src].push_back(p.w[i]);
    end
    txq[src].push_back(p);
    pending++;
  endtask

  task automatic drain(int limit);
    int t = 0;
    bit b;
    do begin
      @(posedge clk);
      t++;
      b = (pending != 0);
      for (int n = 0; n < NN; n++) if (drv_busy[n] || txq[n].size() != 0) b = 1;
    end while (b && t < limit);
    chk(!b, "traffic drained");
    repeat (5) @(posedge clk);
  endtask

  // decisions of router (0,0) for flits from its own node
  int n_one_cong_0 = 0;
  int n_north_0 = 0;
  int n_flits_w2 = 0;
  int n_two_ways = 0;
  always @(posedge clk) if (rst_n && dut.u_mesh.dec_valid_o[0][DIR_L]) begin
    if (dut.u_mesh.dec_case_o[0][DIR_L] == RC_ONE_CONG) n_one_cong_0++;
    if (dut.u_mesh.dec_dir_o[0][DIR_L] == DIR_N) n_north_0++;
  end

  initial begin
    for (int n = 0; n < NN; n++) sink_en[n] = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // ---- workload 1: uncongested, from (0,0) to every node ----
    for (int d = 1; d < NN; d++) begin
      for (int len = 1; len <= 4; len++) begin
        int h;
        longint lat;
        h = (d % 4) + (d / 4);
        send(0, d, len);
        drain(3000);
        lat = done_t[d] - hdr_t[0];
        chk(lat == 10 * h + 11 * len + 9,
            $sformatf("latency (0,0)->(%0d,%0d), %0d flits: %0d, expected %0d",
                      d % 4, d / 4, len, lat, 10 * h + 11 * len + 9));
        if (d == 15) $display("uncongested (0,0)->(3,3), %0d flit(s): %0d cycles", len, lat);
      end
    end

    // ---- workload 2: first shortest route congested ----
    sink_en[1] = 1'b0;
    send(0, 1, 1);
    send(2, 1, 1);
    send(5, 1, 1);
    send(1, 1, 1);
    repeat (320) @(posedge clk);
    sink_en[1] = 1'b1;
    drain(3000);
    chk(congested[1], "router (1,0) congested");
    send(1, 0, 1);
    drain(3000);
    // every destination north of row 0: 1 to 4 flits each, one packet at a
    // time; none of these routes has to pass through (1,0)
    n_one_cong_0 = 0;
    n_north_0    = 0;
    n_flits_w2   = 0;
    n_two_ways   = 0;
    for (int d = 4; d < NN; d++) begin
      for (int len = 1; len <= 4; len++) begin
        int h;
        longint lat;
        h = (d % 4) + (d / 4);
        send(0, d, len);
        drain(3000);
        n_flits_w2 += len;
        if (d % 4 != 0) n_two_ways += len;
        lat = done_t[d] - hdr_t[0];
        chk(lat == 10 * h + 11 * len + 9,
            $sformatf("congested case, latency (0,0)->(%0d,%0d), %0d flits: %0d, expected %0d",
                      d % 4, d / 4, len, lat, 10 * h + 11 * len + 9));
        if (d == 15) $display("congested   (0,0)->(3,3), %0d flit(s): %0d cycles", len, lat);
      end
    end
    chk(congested[1], "router (1,0) still congested");
    chk(n_one_cong_0 == n_two_ways && n_north_0 == n_flits_w2,
        $sformatf("(0,0) avoided congested (1,0): %0d of %0d flits by rule, %0d of %0d north",
                  n_one_cong_0, n_two_ways, n_north_0, n_flits_w2));

    // ---- random all-to-all traffic ----
    for (int r = 0; r < 8; r++) begin
      for (int s = 0; s < NN; s++) begin
        int d;
        d = $urandom_range(NN - 1);
        // a source's packets to one destination must not overlap in flight:
        // the flit format has no packet number
        send(s, d, $urandom_range(1, 6));
      end
      drain(20000);
    end

    for (int d = 0; d < NN; d++)
      for (int s = 0; s < NN; s++)
        chk(expw[d][s].size() == 0, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
