// tb_congestion_calc: feeds random departing-flit delays (0 to 5 per cycle)
// into the delay averager and compares the average, the 4-bit delay
// information and the congested flag with an integer model of the moving
// average. Then drives a steady delay of 100 cycles and checks that the
// router turns congested (info >= 11) and, at a steady 19 cycles, that it
// recovers.
module tb_congestion_calc;
  import noc_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic [NPORTS-1:0] sv;
  delay_t            smp [NPORTS];
  logic [CNT_W:0]    avg;
  logic [INFO_W-1:0] info;
  logic              cong;

  always #5 clk = ~clk;

  congestion_calc dut (
    .clk, .rst_n,
    .sample_valid_i (sv),
    .sample_i       (smp),
    .avg_o          (avg),
    .info_o         (info),
    .congested_o    (cong)
  );

  int checks = 0;
  int failures = 0;
  int model = 0;      // average in 1/16 cycle

  task automatic step(int nvalid_max, int lo, int hi);
    int sum, nx, mi, inf;
    @(negedge clk);
    sum = 0;
    for (int p = 0; p < NPORTS; p++) begin
      sv[p]      = (p < nvalid_max) ? 1'($urandom_range(1)) : 1'b0;
      smp[p].pd  = 8'($urandom_range(lo, hi) / 2);
      smp[p].qd  = 8'($urandom_range(lo, hi) - smp[p].pd);
      if (sv[p]) sum += (int'(smp[p].pd) + int'(smp[p].qd)) * 16 - model;
    end
    nx = model + (sum >>> 3);
    if (sum < 0 && (sum % 8) != 0) nx = model + (sum / 8) - 1;   // floor
    else nx = model + sum / 8;
    if (nx < 0) nx = 0;
    if (nx > 8191) nx = 8191;
    @(posedge clk);
    if (sv != 0) model = nx;
    #1;
    mi  = model / 16;
    inf = (mi / 8 > 15) ? 15 : mi / 8;
    checks++;
    if (int'(avg) != mi || int'(info) != inf || cong != (inf >= 11)) begin
      failures++;
      $display("FAIL: avg %0d info %0d cong %b, want %0d %0d %b", avg, info, cong, mi, inf, inf >= 11);
    end
  endtask

  initial begin
    sv = '0;
    for (int p = 0; p < NPORTS; p++) smp[p] = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (avg != 0 || info != 0 || cong) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) step(5, 0, 510);
    for (int i = 0; i < 200; i++) step(1, 100, 100);
    checks++;
    if (!cong || avg < 95) begin failures++; $display("FAIL: steady 100 not congested"); end
    for (int i = 0; i < 200; i++) step(2, 19, 19);
    checks++;
    if (cong || info != 2) begin failures++; $display("FAIL: steady 19 gives info %0d", info); end
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
