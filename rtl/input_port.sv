// input_port: one input port of a router.
//
// The port receives a 64-bit flit over an 8-bit channel, one byte per cycle,
// byte 1 first, into a buffer that holds exactly one flit (the design's
// buffer is 64 bits, one flit). While the buffer is filling it also hands the
// congestion byte (byte 3) to the router's congestion information table, the
// moment that byte arrives. After the eighth byte the flit spends one cycle
// in the routing-computation stage and then requests the switch (req_o) until
// the output port that the RC unit chose grants it (grant_i).
//
// The port keeps the two delay terms of the router's delay model for the flit
// it holds: cycles in which the flit moves (receiving bytes, the RC stage)
// count as propagation delay pd, cycles in which it waits for the switch
// count as queuing delay qd. Both travel on to the output port with the flit.
//
// Interface: in_i / in_ready_o form the channel (a byte moves when valid and
// ready are both high); ready is high whenever the buffer is empty or still
// filling, so an upstream port can always send all eight bytes back to back.
// flit_o, delay_o and req_o are valid while req_o is high; grant_i empties the
// buffer at the next clock edge. Reset is asynchronous, active low.
// The one-cycle RC stage and the handshake are this design's choices.
module input_port
  import noc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // channel from the upstream router or processing element
  input  link_t        in_i,
  output logic         in_ready_o,
  // congestion byte of the flit being received
  output logic         cong_valid_o,
  output cong_t        cong_o,
  // buffered flit towards the RC unit and the switch
  output flit_t        flit_o,
  output delay_t       delay_o,
  output logic         req_o,
  input  logic         grant_i
);

  typedef enum logic [1:0] {S_EMPTY, S_RECV, S_RC, S_WAIT} state_e;

  state_e                        state_q;
  logic [$clog2(FLIT_BYTES)-1:0] idx_q;
  logic [FLIT_W-1:0]             buf_q;
  delay_t                        dly_q;
  logic                          take;

  assign in_ready_o = (state_q == S_EMPTY) || (state_q == S_RECV);
  assign take       = in_i.valid && in_ready_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_EMPTY;
      idx_q   <= '0;
      buf_q   <= '0;
      dly_q   <= '0;
    end else begin
      unique case (state_q)
        S_EMPTY: begin
          if (take) begin
            buf_q[0 +: CH_W] <= in_i.data;
            idx_q            <= 1;
            dly_q.pd         <= 1;
            dly_q.qd         <= '0;
            state_q          <= S_RECV;
          end
        end
        S_RECV: begin
          if (take) begin
            buf_q[idx_q*CH_W +: CH_W] <= in_i.data;
            idx_q                     <= idx_q + 1'b1;
            if (idx_q == 3'(FLIT_BYTES - 1)) state_q <= S_RC;
          end
          // the channel idles only if the sender stalls mid-flit; count that
          // time as moving, it is not spent waiting in this router
          dly_q.pd <= sat_inc(dly_q.pd);
        end
        S_RC: begin
          dly_q.pd <= sat_inc(dly_q.pd);
          state_q  <= S_WAIT;
        end
        S_WAIT: begin
          if (grant_i) begin
            state_q <= S_EMPTY;
          end else begin
            dly_q.qd <= sat_inc(dly_q.qd);
          end
        end
        default: state_q <= S_EMPTY;
      endcase
    end
  end

  // byte index 2 carries the congestion information
  assign cong_valid_o = take && (state_q == S_RECV) && (idx_q == 2);
  assign cong_o       = cong_t'(in_i.data);

  assign flit_o  = flit_t'(buf_q);
  assign delay_o = dly_q;
  assign req_o   = (state_q == S_WAIT);

  // a grant is only meaningful for a flit that is asking for the switch
  a_grant_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
    grant_i |-> req_o);

endmodule
