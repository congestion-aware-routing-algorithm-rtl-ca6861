// rc_unit: routing decision of the congestion-aware router (combinational).
//
// Level one compares the flit's destination with this router's address, x
// first and then y, and finds the productive directions: one towards the
// destination along x (E or W) and one along y (N or S). A flit whose
// destination is this router goes to the local port; a flit with only one
// productive direction takes it.
//
// Level two chooses between the two candidates with the congestion
// information table (CITb):
//   * both neighbours uncongested: the one with the lower delay information;
//   * one congested: the uncongested one;
//   * both congested: look at the next-door neighbour of each route, the
//     router the flit would reach one hop after the neighbour. If exactly one
//     of the two is uncongested, take that route, otherwise take the one whose
//     neighbour has the lower delay information.
// These rules are the design's. Its own choices: a tie in delay information
// goes to the x route (x is compared first); the next-door neighbour of a
// route is the next router on the same axis while more than one hop remains
// on that axis, and otherwise the next router on the other axis; a neighbour
// counts as congested when its 4-bit delay information exceeds 70 percent of
// full scale (noc_pkg::is_congested).
//
// Interface: cur_i is this router's address, dst_i the flit's destination,
// cit_i the table indexed by dir_e (N, E, W, S). dir_o is the chosen output
// port and case_o names the rule that chose it. No clock: the router samples
// the result in the cycle the flit asks for the switch.
module rc_unit
  import noc_pkg::*;
(
  input  addr_t      cur_i,
  input  addr_t      dst_i,
  input  cit_entry_t cit_i [NDIRS],
  output dir_e       dir_o,
  output rc_case_e   case_o
);

  logic  need_x, need_y;
  dir_e  cand_x, cand_y;
  dir_e  nd_dir_x, nd_dir_y;     // direction of the next-door hop of each route
  logic  far_x, far_y;           // more than one hop left on that axis
  logic  cong_x, cong_y;         // neighbour congested
  logic  nd_cong_x, nd_cong_y;   // next-door neighbour congested
  logic  x_not_worse;            // x neighbour delay <= y neighbour delay

  always_comb begin
    need_x = (dst_i.x != cur_i.x);
    need_y = (dst_i.y != cur_i.y);
    cand_x = (dst_i.x > cur_i.x) ? DIR_E : DIR_W;
    cand_y = (dst_i.y > cur_i.y) ? DIR_N : DIR_S;
    far_x  = (dst_i.x > cur_i.x) ? (dst_i.x - cur_i.x > 1) : (cur_i.x - dst_i.x > 1);
    far_y  = (dst_i.y > cur_i.y) ? (dst_i.y - cur_i.y > 1) : (cur_i.y - dst_i.y > 1);
    // when both axes remain, the hop after the x neighbour continues along x
    // if more than one x hop is left, otherwise it turns to y (and vice versa)
    nd_dir_x = far_x ? cand_x : cand_y;
    nd_dir_y = far_y ? cand_y : cand_x;

    cong_x      = is_congested(cit_i[cand_x[1:0]].delay_info);
    cong_y      = is_congested(cit_i[cand_y[1:0]].delay_info);
    nd_cong_x   = cit_i[cand_x[1:0]].nbr_status[nd_dir_x[1:0]];
    nd_cong_y   = cit_i[cand_y[1:0]].nbr_status[nd_dir_y[1:0]];
    x_not_worse = cit_i[cand_x[1:0]].delay_info <= cit_i[cand_y[1:0]].delay_info;

    if (!need_x && !need_y) begin
      dir_o  = DIR_L;
      case_o = RC_LOCAL;
    end else if (!need_y) begin
      dir_o  = cand_x;
      case_o = RC_SINGLE;
    end else if (!need_x) begin
      dir_o  = cand_y;
      case_o = RC_SINGLE;
    end else if (!cong_x && !cong_y) begin
      dir_o  = x_not_worse ? cand_x : cand_y;
      case_o = RC_FREE_DELAY;
    end else if (cong_x != cong_y) begin
      dir_o  = cong_x ? cand_y : cand_x;
      case_o = RC_ONE_CONG;
    end else if (nd_cong_x == nd_cong_y) begin
      dir_o  = x_not_worse ? cand_x : cand_y;
      case_o = RC_ND_DELAY;
    end else begin
      dir_o  = nd_cong_x ? cand_y : cand_x;
      case_o = RC_ND_FREE;
    end
  end

endmodule
