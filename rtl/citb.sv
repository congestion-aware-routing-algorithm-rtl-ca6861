// citb: congestion information table of one router.
//
// One row per neighbour (N, E, W, S), each holding what the neighbour last
// sent in the congestion byte of a flit: its own 4-bit delay information and
// the 1-bit congestion status of its four neighbours (this router's
// next-door neighbours). A row is written whenever a flit's congestion byte
// arrives on that neighbour's input port, so the table is refreshed by the
// data traffic itself and needs no separate congestion network. The four
// ports write different rows and never collide.
//
// From the table the router also derives the status of its own neighbours,
// nbr_cong_o, which it puts into the congestion byte of every flit it sends:
// a neighbour is congested when its delay information exceeds 70 percent of
// full scale.
//
// Interface: wr_i[d] with wr_data_i[d] updates row d at the clock edge; rows_o
// and nbr_cong_o show the registered contents. Rows reset to zero (delay 0,
// nobody congested), the design's own choice for a table not yet filled.
module citb
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NDIRS-1:0]  wr_i,
  input  cit_entry_t        wr_data_i [NDIRS],
  output cit_entry_t        rows_o    [NDIRS],
  output logic [NDIRS-1:0]  nbr_cong_o
);

  cit_entry_t rows_q [NDIRS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NDIRS; d++) rows_q[d] <= '0;
    end else begin
      for (int d = 0; d < NDIRS; d++)
        if (wr_i[d]) rows_q[d] <= wr_data_i[d];
    end
  end

  always_comb begin
    for (int d = 0; d < NDIRS; d++) begin
      rows_o[d]     = rows_q[d];
      nbr_cong_o[d] = is_congested(rows_q[d].delay_info);
    end
  end

endmodule
