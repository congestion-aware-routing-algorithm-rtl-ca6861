// tb_output_port: offers flits from the five input ports to one output port
// and checks the round-robin grant order, the bytes sent on the channel (byte
// 1 first, congestion byte replaced by the router's own) and the reported
// delay: pd + 9 (switch and 8 bytes) and qd + the cycles the
// downstream port held ready low.
module tb_output_port;
  import noc_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic [NPORTS-1:0] req;
  flit_t             flits [NPORTS];
  delay_t            dly   [NPORTS];
  cong_t             own;
  logic [NPORTS-1:0] grant;
  link_t             out;
  logic              out_ready;
  logic              sv;
  delay_t            smp;

  always #5 clk = ~clk;

  output_port dut (
    .clk, .rst_n,
    .req_i          (req),
    .flit_i         (flits),
    .delay_i        (dly),
    .cong_i         (own),
    .grant_o        (grant),
    .out_o          (out),
    .out_ready_i    (out_ready),
    .sample_valid_o (sv),
    .sample_o       (smp)
  );

  int checks = 0;
  int failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected stream of flits and delays, in grant order
  flit_t  exp_f [$];
  delay_t exp_d [$];
  int     last_win = NPORTS - 1;
  int     stall = 0;

  // request side: refill a requester randomly after its grant
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (!req[p] && $urandom_range(3) == 0) begin
        flits[p] = flit_t'({$urandom, $urandom});
        dly[p]   = '{pd: 8'($urandom_range(9, 20)), qd: 8'($urandom_range(0, 30))};
        req[p]   = 1'b1;
      end
    end
    own       = cong_t'($urandom);
    out_ready = ($urandom_range(3) != 0);
  end

  // grant check against a round-robin model
  always @(posedge clk) if (rst_n) begin
    int    want;
    flit_t f;
    want = -1;
    if (grant != 0) begin
      for (int k = 1; k <= NPORTS; k++)
        if (want < 0 && req[(last_win + k) % NPORTS]) want = (last_win + k) % NPORTS;
      chk(grant == NPORTS'(1 << want), "round-robin grant");
      f      = flits[want];
      f.cong = own;
      exp_f.push_back(f);
      exp_d.push_back(dly[want]);
      last_win = want;
      req[want] <= 1'b0;
    end
  end

  // receiver
  flit_t rbuf;
  int    ridx = 0;
  int    nflits = 0;
  always @(posedge clk) if (rst_n) begin
    if (out.valid && !out_ready) stall++;
    if (out.valid && out_ready) begin
      rbuf[ridx*CH_W +: CH_W] = out.data;
      if (ridx == FLIT_BYTES - 1) begin
        flit_t  f;
        delay_t d;
        f = exp_f.pop_front();
        d = exp_d.pop_front();
        chk(rbuf == f, "flit bytes and congestion byte");
        chk(sv && smp.pd == d.pd + 9 && smp.qd == d.qd + 8'(stall), "delay sample");
        ridx = 0;
        stall = 0;
        nflits++;
      end else begin
        chk(!sv, "no sample before the last byte");
        ridx++;
      end
    end
  end

  initial begin
    req = '0;
    for (int p = 0; p < NPORTS; p++) begin
      flits[p] = '0;
      dly[p]   = '0;
    end
    own       = '0;
    out_ready = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (nflits >= 400);
    chk(1'b1, "400 flits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
