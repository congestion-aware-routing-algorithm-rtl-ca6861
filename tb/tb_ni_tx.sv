// tb_ni_tx: sends random packets (1 to 12 words, random destinations)
// through the packetizer at node (2,1) and rebuilds the flits from the byte
// channel, with random stalls from the receiver. Every flit must carry source
// (2,1), the packet's destination, an empty congestion byte, the word in
// order, sequence numbers 0..n-1 and the last bit only on the final flit.
// With the receiver always ready a flit takes 9 cycles (1 to load, 8 bytes).
module tb_ni_tx;
  import noc_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        pkt_valid, pkt_ready;
  addr_t       pkt_dst;
  logic [7:0]  pkt_len;
  logic        word_valid, word_ready;
  logic [31:0] word;
  link_t       out;
  logic        out_ready;

  always #5 clk = ~clk;

  ni_tx #(.X(2), .Y(1)) dut (
    .clk, .rst_n,
    .pkt_valid_i  (pkt_valid),
    .pkt_ready_o  (pkt_ready),
    .pkt_dst_i    (pkt_dst),
    .pkt_len_i    (pkt_len),
    .word_valid_i (word_valid),
    .word_ready_o (word_ready),
    .word_i       (word),
    .out_o        (out),
    .out_ready_i  (out_ready)
  );

  int checks = 0;
  int failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  flit_t  expq [$];
  bit     stall_en = 1'b1;
  longint first_t [$];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // receiver
  flit_t rbuf;
  int    ridx = 0;
  int    nrx = 0;
  always @(negedge clk) out_ready = stall_en ? ($urandom_range(3) != 0) : 1'b1;
  always @(posedge clk) if (rst_n && out.valid && out_ready) begin
    if (ridx == 0) first_t.push_back(cycle);
    rbuf[ridx*CH_W +: CH_W] = out.data;
    if (ridx == FLIT_BYTES - 1) begin
      flit_t e;
      e = expq.pop_front();
      chk(rbuf == e, $sformatf("flit %h, expected %h", rbuf, e));
      ridx = 0;
      nrx++;
    end else begin
      ridx++;
    end
  end

  task automatic packet(int len);
    addr_t d;
    d = '{x: coord_t'($urandom_range(3)), y: coord_t'($urandom_range(3))};
    @(negedge clk);
    pkt_valid = 1'b1;
    pkt_dst   = d;
    pkt_len   = 8'(len);
    @(posedge clk);
    while (!pkt_ready) @(posedge clk);
    @(negedge clk);
    pkt_valid = 1'b0;
    for (int k = 0; k < len; k++) begin
      flit_t e;
      word_valid = 1'b1;
      word       = $urandom;
      e          = '0;
      e.src      = '{x: 4'd2, y: 4'd1};
      e.dst      = d;
      e.data     = word;
      e.seq      = 7'(k);
      e.last     = (k == len - 1);
      expq.push_back(e);
      @(posedge clk);
      while (!word_ready) @(posedge clk);
      @(negedge clk);
      word_valid = 1'b0;
    end
  endtask

  initial begin
    pkt_valid  = 1'b0;
    pkt_dst    = '0;
    pkt_len    = '0;
    word_valid = 1'b0;
    word       = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 100; p++) packet($urandom_range(1, 12));
    wait (expq.size() == 0);
    // timing with the receiver always ready: words offered at once
    stall_en = 1'b0;
    repeat (20) @(posedge clk);
    first_t.delete();
    fork
      packet(5);
    join_none
    wait (first_t.size() == 5);
    for (int k = 1; k < 5; k++)
      chk(first_t[k] - first_t[k-1] == 9,
          $sformatf("flit spacing %0d", first_t[k] - first_t[k-1]));
    wait (expq.size() == 0);
    repeat (10) @(posedge clk);
    chk(nrx > 100, "flits received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
