// congestion_calc: the router's own congestion information.
//
// Every flit that leaves the router reports its total delay in the router,
// T_D = P_D + Q_D: the cycles it spent moving through the input port, the RC
// stage, the switch and the output port (propagation delay) plus the cycles it
// spent waiting in the input and output buffers (queuing delay). This block
// keeps a running average of T_D over the flits and turns it into the 4-bit
// delay information that the router writes into the congestion byte of the
// flits it sends, and into the router's own congested flag.
//
// The average is an exponential moving average with four fraction bits:
//   avg <- avg + (sum over the flits leaving this cycle of (T_D - avg)) / 2^AVG_SHIFT
// Up to five flits (one per output port) can leave in the same cycle; with
// AVG_SHIFT = 3 the update stays stable (5/8 < 1).
// The delay information is the average in cycles divided by 2^DELAY_SHIFT and
// saturated at 15, so full scale is 15 * 2^DELAY_SHIFT = 120 cycles by
// default. The router is congested when the information exceeds 70 percent of
// full scale, i.e. info >= 11 (an average of 88 cycles or more).
// That the average is used, and the 70 percent threshold, follow the design;
// the kind of average, its weight and the scaling to 4 bits are this
// design's own choices.
//
// Interface: sample_valid_i[p] / sample_i[p] report a departing flit's delay
// counters. avg_o (whole cycles), info_o and congested_o are registered and
// change one cycle after the samples. Reset clears the average to zero.
module congestion_calc
  import noc_pkg::*;
#(
  parameter int unsigned NSAMPLES    = NPORTS,
  parameter int unsigned DELAY_SHIFT = 3,
  parameter int unsigned AVG_SHIFT   = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NSAMPLES-1:0] sample_valid_i,
  input  delay_t              sample_i [NSAMPLES],
  output logic [CNT_W:0]      avg_o,
  output logic [INFO_W-1:0]   info_o,
  output logic                congested_o
);

  localparam int unsigned FRAC  = 4;
  localparam int unsigned TD_W  = CNT_W + 1;          // pd + qd
  localparam int unsigned AVG_W = TD_W + FRAC;
  localparam int unsigned SUM_W = AVG_W + 2 + $clog2(NSAMPLES + 1);
  localparam logic [AVG_W-1:0] AVG_MAX = '1;

  logic [AVG_W-1:0]        avg_q;
  logic signed [SUM_W-1:0] sum;
  logic signed [SUM_W-1:0] next;
  logic [TD_W-1:0]         avg_int;

  always_comb begin
    sum = '0;
    for (int p = 0; p < NSAMPLES; p++) begin
      if (sample_valid_i[p])
        sum += $signed({{(SUM_W-AVG_W){1'b0}},
                        (TD_W'(sample_i[p].pd) + TD_W'(sample_i[p].qd)), {FRAC{1'b0}}})
             - $signed({{(SUM_W-AVG_W){1'b0}}, avg_q});
    end
    next = $signed({{(SUM_W-AVG_W){1'b0}}, avg_q}) + (sum >>> AVG_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avg_q <= '0;
    end else if (|sample_valid_i) begin
      if (next < 0)
        avg_q <= '0;
      else if (next > $signed({{(SUM_W-AVG_W){1'b0}}, AVG_MAX}))
        avg_q <= AVG_MAX;
      else
        avg_q <= next[AVG_W-1:0];
    end
  end

  assign avg_int     = avg_q[AVG_W-1:FRAC];
  assign avg_o       = avg_int;
  assign info_o      = ((avg_int >> DELAY_SHIFT) > TD_W'(15)) ? INFO_W'(15)
                                                              : INFO_W'(avg_int >> DELAY_SHIFT);
  assign congested_o = is_congested(info_o);

endmodule
