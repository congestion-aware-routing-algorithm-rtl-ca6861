// tb_ni_rx: in each round several sources send one packet each (1 to 8
// flits); all their flits are shuffled together, so flits arrive out of
// sequence order and interleaved across sources, and are fed to the
// reassembler byte by byte. Each packet must come out complete, words in
// sequence order, with the right source, indices and last flag, whatever the
// arrival order; the receiver of the output stream stalls at random.
// The first word of a packet must appear 1 cycle after its final byte.
module tb_ni_rx;
  import noc_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  link_t       in;
  logic        in_ready;
  logic        out_valid, out_ready;
  addr_t       out_src;
  logic [6:0]  out_idx;
  logic [31:0] out_word;
  logic        out_last;

  always #5 clk = ~clk;

  ni_rx dut (
    .clk, .rst_n,
    .in_i        (in),
    .in_ready_o  (in_ready),
    .out_valid_o (out_valid),
    .out_ready_i (out_ready),
    .out_src_o   (out_src),
    .out_idx_o   (out_idx),
    .out_word_o  (out_word),
    .out_last_o  (out_last)
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

  logic [31:0] words [16][$];   // expected words of the packet in flight per source
  int          npk_out = 0;
  int          widx [16];

  always @(negedge clk) out_ready = ($urandom_range(2) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int s;
    s = int'(out_src.y) * 4 + int'(out_src.x);
    chk(words[s].size() > 0, "packet from a source with nothing pending");
    if (words[s].size() > 0) begin
      chk(int'(out_idx) == widx[s], "word index in order");
      chk(out_word == words[s].pop_front(), "word value");
      chk(out_last == (words[s].size() == 0), "last flag");
      widx[s]++;
      if (out_last) begin
        widx[s] = 0;
        npk_out++;
      end
    end
  end

  task automatic send_flit(flit_t f);
    for (int b = 0; b < FLIT_BYTES; b++) begin
      @(negedge clk);
      in.valid = 1'b1;
      in.data  = f[b*CH_W +: CH_W];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in.valid = 1'b0;
  endtask

  initial begin
    flit_t pool [$];
    int    npk_in = 0;
    in = '0;
    foreach (widx[i]) widx[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 60; r++) begin
      pool.delete();
      for (int s = 0; s < 16; s++) begin
        if ($urandom_range(2) == 0) begin
          int len;
          len = $urandom_range(1, 8);
          npk_in++;
          for (int k = 0; k < len; k++) begin
            flit_t f;
            f      = flit_t'({$urandom, $urandom});
            f.src  = '{x: coord_t'(s % 4), y: coord_t'(s / 4)};
            f.seq  = 7'(k);
            f.last = (k == len - 1);
            words[s].push_back(f.data);
            pool.push_back(f);
          end
        end
      end
      pool.shuffle();
      foreach (pool[i]) send_flit(pool[i]);
      // let every packet of the round drain
      repeat (200) @(posedge clk);
      for (int s = 0; s < 16; s++) chk(words[s].size() == 0, "round complete");
    end
    chk(npk_out == npk_in, "all packets delivered");

    // timing: one 1-flit packet, output ready
    begin
      flit_t  f;
      longint t_last, t_word;
      f      = '0;
      f.src  = '{x: 4'd3, y: 4'd2};
      f.last = 1'b1;
      f.data = 32'h1234_5678;
      words[11].push_back(f.data);
      fork
        send_flit(f);
        begin
          @(posedge clk);
          while (!(in.valid && in_ready && dut.ridx_q == 3'd7)) @(posedge clk);
          t_last = $time;
          @(posedge clk);
          while (!out_valid) @(posedge clk);
          t_word = $time;
          chk(t_word - t_last == 10, $sformatf("first word %0d ns after the final byte", t_word - t_last));
        end
      join
      repeat (10) @(posedge clk);
    end
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
