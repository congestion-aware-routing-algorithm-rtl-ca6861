// ni_tx: packetizer of a node's network interface.
//
// The processing element hands over a packet as a header (destination and
// length in flits, 1..MAX_FLITS) followed by one 32-bit word per flit. For
// each word the packetizer builds a 64-bit flit: this node's address as
// source, the destination, an empty congestion byte (the router fills it in),
// the word as payload, the sequence number 0..length-1 and the last-flit bit
// on the final one. It sends the flit to the router's local port over the
// 8-bit channel, byte 1 first. Splitting the data into numbered flits with
// 4 data bytes each, the 7-bit sequence number and the last bit follow the
// design; the header/word handshake is this design's choice.
//
// Interface: pkt_valid_i / pkt_ready_o take the header (dst, len); then
// word_valid_i / word_ready_o take the words, one per flit, each accepted
// only when the previous flit has been sent. out_o / out_ready_i is the byte
// channel to the router. A flit needs 1 cycle to load and 8 cycles to send
// when the router is ready. Reset is asynchronous, active low.
module ni_tx
  import noc_pkg::*;
#(
  parameter int unsigned X         = 0,
  parameter int unsigned Y         = 0,
  parameter int unsigned MAX_FLITS = 128,
  localparam int unsigned LEN_W    = $clog2(MAX_FLITS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pkt_valid_i,
  output logic             pkt_ready_o,
  input  addr_t            pkt_dst_i,
  input  logic [LEN_W-1:0] pkt_len_i,
  input  logic             word_valid_i,
  output logic             word_ready_o,
  input  logic [31:0]      word_i,
  output link_t            out_o,
  input  logic             out_ready_i
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_SEND} state_e;

  state_e                        state_q;
  addr_t                         dst_q;
  logic [LEN_W-1:0]              len_q;
  logic [6:0]                    seq_q;
  flit_t                         flit_q;
  logic [$clog2(FLIT_BYTES)-1:0] idx_q;

  assign pkt_ready_o  = (state_q == S_IDLE);
  assign word_ready_o = (state_q == S_LOAD);
  assign out_o.valid  = (state_q == S_SEND);
  assign out_o.data   = flit_q[idx_q*CH_W +: CH_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      dst_q   <= '0;
      len_q   <= '0;
      seq_q   <= '0;
      flit_q  <= '0;
      idx_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (pkt_valid_i && pkt_len_i != 0) begin
            dst_q   <= pkt_dst_i;
            len_q   <= pkt_len_i;
            seq_q   <= '0;
            state_q <= S_LOAD;
          end
        end
        S_LOAD: begin
          if (word_valid_i) begin
            flit_q.src  <= '{x: coord_t'(X), y: coord_t'(Y)};
            flit_q.dst  <= dst_q;
            flit_q.cong <= '0;
            flit_q.data <= word_i;
            flit_q.seq  <= seq_q;
            flit_q.last <= (LEN_W'(seq_q) == len_q - 1'b1);
            idx_q       <= '0;
            state_q     <= S_SEND;
          end
        end
        S_SEND: begin
          if (out_ready_i) begin
            if (idx_q == 3'(FLIT_BYTES - 1)) begin
              if (flit_q.last) begin
                state_q <= S_IDLE;
              end else begin
                seq_q   <= seq_q + 1'b1;
                state_q <= S_LOAD;
              end
            end else begin
              idx_q <= idx_q + 1'b1;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
