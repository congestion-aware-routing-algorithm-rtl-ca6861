// ni_rx: reassembly side of a node's network interface.
//
// Every flit is routed on its own, so the flits of one packet can reach the
// destination out of order, and flits of packets from different sources can
// interleave. The reassembler keeps one packet context per source node: a
// word memory with one slot per sequence number, a bitmap of the sequence
// numbers received, their count, and the packet length once the flit with
// the last-flit bit has come in (length = its sequence number + 1). When the
// count reaches the length the packet is complete and its words are handed
// to the processing element in sequence order, 0 first. Putting the data back
// in order by sequence number follows the design; the per-source contexts
// and the output stream are this design's choices.
//
// Interface: in_i / in_ready_o is the byte channel from the router's local
// port (byte 1 first). out_* streams a completed packet, one word per
// accepted cycle (out_valid_o and out_ready_i both high), with the source
// address, the word's index and a flag on the last word. While a packet is
// streamed out no new byte is accepted (in_ready_o low), which backs traffic
// up into the network. Flits whose source lies outside the mesh or whose
// sequence number is MAX_FLITS or more are dropped; a repeated sequence number
// overwrites the word without being counted twice. The word memory is
// MESH_X*MESH_Y*MAX_FLITS words of 32 bits. Reset clears the contexts, not
// the word memory. A packet's first word appears 1 cycle after its final
// byte arrives.
module ni_rx
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned MAX_FLITS = 128,
  localparam int unsigned LEN_W    = $clog2(MAX_FLITS + 1),
  localparam int unsigned SEQ_W    = (MAX_FLITS > 1) ? $clog2(MAX_FLITS) : 1,
  localparam int unsigned NSRC     = MESH_X * MESH_Y,
  localparam int unsigned SRC_W    = (NSRC > 1) ? $clog2(NSRC) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  link_t            in_i,
  output logic             in_ready_o,
  output logic             out_valid_o,
  input  logic             out_ready_i,
  output addr_t            out_src_o,
  output logic [SEQ_W-1:0] out_idx_o,
  output logic [31:0]      out_word_o,
  output logic             out_last_o
);

  typedef enum logic {S_RECV, S_DRAIN} state_e;

  state_e                        state_q;
  logic [FLIT_W-1:0]             rbuf_q;
  logic [$clog2(FLIT_BYTES)-1:0] ridx_q;

  logic [31:0]          mem_q  [NSRC * MAX_FLITS];
  logic [MAX_FLITS-1:0] got_q  [NSRC];
  logic [LEN_W-1:0]     cnt_q  [NSRC];
  logic [LEN_W-1:0]     len_q  [NSRC];
  logic                 have_last_q [NSRC];

  logic [SRC_W-1:0]     dsrc_q;      // source being drained
  logic [LEN_W-1:0]     dlen_q;
  logic [SEQ_W-1:0]     didx_q;

  // a flit completes in the cycle its eighth byte is taken
  logic             take, flit_done, flit_ok;
  flit_t            f;
  logic [SRC_W-1:0] s;
  logic [SEQ_W-1:0] q;
  logic             is_new;
  logic [LEN_W-1:0] cnt_n, len_n;
  logic             have_last_n, complete;

  assign in_ready_o = (state_q == S_RECV);
  assign take       = in_i.valid && in_ready_o;
  assign flit_done  = take && (ridx_q == 3'(FLIT_BYTES - 1));

  always_comb begin
    f           = flit_t'({in_i.data, rbuf_q[FLIT_W-CH_W-1:0]});
    s           = SRC_W'(int'(f.src.y) * MESH_X + int'(f.src.x));
    q           = SEQ_W'(f.seq);
    flit_ok     = flit_done && (int'(f.src.x) < MESH_X) && (int'(f.src.y) < MESH_Y) &&
                  (int'(f.seq) < MAX_FLITS);
    is_new      = !got_q[s][q];
    cnt_n       = cnt_q[s] + LEN_W'(is_new);
    len_n       = f.last ? LEN_W'(f.seq) + 1'b1 : len_q[s];
    have_last_n = have_last_q[s] || f.last;
    complete    = flit_ok && have_last_n && (cnt_n == len_n);
  end

  always_ff @(posedge clk) begin
    if (flit_ok) mem_q[int'(s) * MAX_FLITS + int'(q)] <= f.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_RECV;
      rbuf_q  <= '0;
      ridx_q  <= '0;
      dsrc_q  <= '0;
      dlen_q  <= '0;
      didx_q  <= '0;
      for (int i = 0; i < NSRC; i++) begin
        got_q[i]       <= '0;
        cnt_q[i]       <= '0;
        len_q[i]       <= '0;
        have_last_q[i] <= 1'b0;
      end
    end else begin
      if (take) begin
        rbuf_q[ridx_q*CH_W +: CH_W] <= in_i.data;
        ridx_q                      <= ridx_q + 1'b1;   // wraps after byte 8
      end
      if (flit_ok) begin
        if (complete) begin
          got_q[s]       <= '0;
          cnt_q[s]       <= '0;
          have_last_q[s] <= 1'b0;
          dsrc_q         <= s;
          dlen_q         <= len_n;
          didx_q         <= '0;
          state_q        <= S_DRAIN;
        end else begin
          got_q[s][q]    <= 1'b1;
          cnt_q[s]       <= cnt_n;
          len_q[s]       <= len_n;
          have_last_q[s] <= have_last_n;
        end
      end
      if (state_q == S_DRAIN && out_ready_i) begin
        if (LEN_W'(didx_q) == dlen_q - 1'b1) state_q <= S_RECV;
        else didx_q <= didx_q + 1'b1;
      end
    end
  end

  assign out_valid_o = (state_q == S_DRAIN);
  assign out_src_o   = '{x: coord_t'(int'(dsrc_q) % MESH_X), y: coord_t'(int'(dsrc_q) / MESH_X)};
  assign out_idx_o   = didx_q;
  assign out_word_o  = mem_q[int'(dsrc_q) * MAX_FLITS + int'(didx_q)];
  assign out_last_o  = (LEN_W'(didx_q) == dlen_q - 1'b1);

endmodule
