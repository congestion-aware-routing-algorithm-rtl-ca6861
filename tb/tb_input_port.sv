// tb_input_port: sends random flits byte by byte into an input port, with
// random gaps, and checks: the congestion byte is reported exactly when the
// third byte arrives; the buffered flit equals the one sent; the request
// rises one cycle after the last byte (the RC stage) and ready stays low
// until the grant; the delay counters hold 9 propagation cycles (8 bytes and
// the RC stage, for back-to-back bytes) plus one queuing cycle per cycle of
// waiting for the grant.
module tb_input_port;
  import noc_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  link_t  in;
  logic   in_ready;
  logic   cong_valid;
  cong_t  cong;
  flit_t  flit;
  delay_t dly;
  logic   req;
  logic   grant;

  always #5 clk = ~clk;

  input_port dut (
    .clk, .rst_n,
    .in_i         (in),
    .in_ready_o   (in_ready),
    .cong_valid_o (cong_valid),
    .cong_o       (cong),
    .flit_o       (flit),
    .delay_o      (dly),
    .req_o        (req),
    .grant_i      (grant)
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

  initial begin
    flit_t f;
    int    wait_cycles;
    int    cong_seen;
    in    = '0;
    grant = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      f = flit_t'({$urandom, $urandom});
      @(negedge clk);
      chk(in_ready && !req, "idle port must be ready and not requesting");
      cong_seen = 0;
      for (int b = 0; b < FLIT_BYTES; b++) begin
        in.valid = 1'b1;
        in.data  = f[b*CH_W +: CH_W];
        #1;
        if (cong_valid) begin
          cong_seen++;
          chk(b == 2 && cong == f.cong, "congestion byte reported at byte 3");
        end
        @(negedge clk);
      end
      in.valid = 1'b0;
      chk(cong_seen == 1, "congestion byte reported once");
      // RC stage: not ready, not yet requesting
      chk(!in_ready && !req, "RC stage");
      @(negedge clk);
      chk(req && !in_ready, "request after the RC stage");
      chk(flit == f, "buffered flit");
      chk(dly.pd == 8'd9 && dly.qd == 8'd0, "propagation count 9");
      // extra bytes offered while full must not be taken
      in.valid = 1'b1;
      in.data  = 8'hA5;
      wait_cycles = $urandom_range(0, 6);
      repeat (wait_cycles) @(negedge clk);
      in.valid = 1'b0;
      chk(req && dly.qd == 8'(wait_cycles) && flit == f, "queuing count while waiting");
      grant = 1'b1;
      @(negedge clk);
      grant = 1'b0;
      chk(!req && in_ready, "free after the grant");
    end
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
