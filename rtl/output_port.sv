// output_port: one output port of a router (switch arbitration, output
// buffer and 8-bit channel transmitter).
//
// Each input port whose flit the RC unit sent to this output raises its bit
// of req_i. A round-robin arbiter grants one of them whenever the one-flit
// output buffer is free, or frees up in this cycle. The granted flit is copied
// across the switch into the buffer; on the way its congestion byte is
// replaced by this router's own: the router's delay information and the
// congestion status of its four neighbours (cong_i). The flit then leaves
// over the 8-bit channel, one byte per cycle, byte 1 first.
//
// The port continues the flit's delay counters: the switch traversal and
// every cycle in which a byte is accepted downstream count as propagation
// delay, every cycle in which the downstream port holds ready low counts as
// queuing delay. When the last byte leaves, the flit's total delay is
// reported on sample_valid_o / sample_o.
//
// Interface: req_i / grant_o per input port (grant is combinational and
// one-hot); flit_i / delay_i are the input ports' buffers. out_o / out_ready_i
// form the channel: a byte moves when valid and ready are both high. Reset is
// asynchronous, active low. Round-robin arbitration, loading in the cycle the
// previous flit's last byte leaves and the channel handshake are this
// design's choices; rewriting the congestion byte at the output port follows
// the design.
module output_port
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] req_i,
  input  flit_t             flit_i  [NPORTS],
  input  delay_t            delay_i [NPORTS],
  input  cong_t             cong_i,
  output logic [NPORTS-1:0] grant_o,
  output link_t             out_o,
  input  logic              out_ready_i,
  output logic              sample_valid_o,
  output delay_t            sample_o
);

  localparam int unsigned PW = $clog2(NPORTS);

  logic [PW-1:0]                 prio_q;      // first input to consider
  logic                          full_q;
  logic [FLIT_W-1:0]             buf_q;
  logic [$clog2(FLIT_BYTES)-1:0] idx_q;
  delay_t                        dly_q;

  logic          send, send_last, can_load, load;
  logic [PW-1:0] win;
  logic          found;
  flit_t         loaded;

  assign send      = full_q && out_ready_i;
  assign send_last = send && (idx_q == 3'(FLIT_BYTES - 1));
  assign can_load  = !full_q || send_last;

  // round-robin choice among the requesting inputs, starting at prio_q
  always_comb begin
    found = 1'b0;
    win   = '0;
    for (int k = 0; k < NPORTS; k++) begin
      int unsigned p;
      p = (int'(prio_q) + k) % NPORTS;
      if (!found && req_i[p]) begin
        found = 1'b1;
        win   = PW'(p);
      end
    end
    load    = found && can_load;
    grant_o = '0;
    if (load) grant_o[win] = 1'b1;
  end

  always_comb begin
    loaded      = flit_i[win];
    loaded.cong = cong_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio_q <= '0;
      full_q <= 1'b0;
      buf_q  <= '0;
      idx_q  <= '0;
      dly_q  <= '0;
    end else begin
      if (load) begin
        buf_q    <= loaded;
        full_q   <= 1'b1;
        idx_q    <= '0;
        dly_q.pd <= sat_inc(delay_i[win].pd);   // switch traversal
        dly_q.qd <= delay_i[win].qd;
        prio_q   <= (win == PW'(NPORTS - 1)) ? '0 : win + 1'b1;
      end else if (send_last) begin
        full_q <= 1'b0;
      end else if (send) begin
        idx_q    <= idx_q + 1'b1;
        dly_q.pd <= sat_inc(dly_q.pd);
      end else if (full_q) begin
        dly_q.qd <= sat_inc(dly_q.qd);
      end
    end
  end

  assign out_o.valid    = full_q;
  assign out_o.data     = buf_q[idx_q*CH_W +: CH_W];
  assign sample_valid_o = send_last;
  assign sample_o       = '{pd: sat_inc(dly_q.pd), qd: dly_q.qd};

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(grant_o));
  a_grant_is_req: assert property (@(posedge clk) disable iff (!rst_n)
    (grant_o & ~req_i) == '0);

endmodule
