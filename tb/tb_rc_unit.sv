// tb_rc_unit: checks the two-level routing decision against a reference
// written in the testbench: directed cases for each rule, then 20000 random
// addresses and congestion tables on a 4 x 4 mesh.
module tb_rc_unit;
  import noc_pkg::*;

  addr_t      cur, dst;
  cit_entry_t cit [NDIRS];
  dir_e       dir;
  rc_case_e   rcase;

  rc_unit dut (.cur_i(cur), .dst_i(dst), .cit_i(cit), .dir_o(dir), .case_o(rcase));

  int checks = 0;
  int failures = 0;

  // reference: returns direction, sets the rule
  function automatic dir_e ref_route(addr_t c, addr_t d, cit_entry_t t [NDIRS],
                                     output rc_case_e rc);
    int   cx = c.x, cy = c.y, tx = d.x, ty = d.y;
    dir_e ax, ay, ndx, ndy;
    bit   kx, ky, nkx, nky;
    if (cx == tx && cy == ty) begin rc = RC_LOCAL; return DIR_L; end
    ax = (tx > cx) ? DIR_E : DIR_W;
    ay = (ty > cy) ? DIR_N : DIR_S;
    if (cy == ty) begin rc = RC_SINGLE; return ax; end
    if (cx == tx) begin rc = RC_SINGLE; return ay; end
    kx = t[ax].delay_info >= 11;   // 70 % of 15 is 10.5
    ky = t[ay].delay_info >= 11;
    if (!kx && !ky) begin
      rc = RC_FREE_DELAY;
      return (t[ax].delay_info <= t[ay].delay_info) ? ax : ay;
    end
    if (kx && !ky) begin rc = RC_ONE_CONG; return ay; end
    if (!kx && ky) begin rc = RC_ONE_CONG; return ax; end
    ndx = ((tx - cx > 1) || (cx - tx > 1)) ? ax : ay;
    ndy = ((ty - cy > 1) || (cy - ty > 1)) ? ay : ax;
    nkx = t[ax].nbr_status[ndx];
    nky = t[ay].nbr_status[ndy];
    if (nkx == nky) begin
      rc = RC_ND_DELAY;
      return (t[ax].delay_info <= t[ay].delay_info) ? ax : ay;
    end
    rc = RC_ND_FREE;
    return nkx ? ay : ax;
  endfunction

  task automatic check(string what);
    rc_case_e rc;
    dir_e     want;
    #1;
    want = ref_route(cur, dst, cit, rc);
    checks++;
    if (dir != want || rcase != rc) begin
      failures++;
      $display("FAIL %s: cur (%0d,%0d) dst (%0d,%0d): got %s/%s want %s/%s", what,
               cur.x, cur.y, dst.x, dst.y, dir.name(), rcase.name(), want.name(), rc.name());
    end
  endtask

  task automatic set_cit(int d, int info, int st);
    cit[d].delay_info = 4'(info);
    cit[d].nbr_status = 4'(st);
  endtask

  initial begin
    for (int d = 0; d < NDIRS; d++) cit[d] = '0;
    // directed: from (1,1) to (3,3)
    cur = '{x: 1, y: 1};
    dst = '{x: 3, y: 3};
    check("both free, tie");
    checks++; if (dir != DIR_E || rcase != RC_FREE_DELAY) failures++;
    set_cit(DIR_E, 5, 0); set_cit(DIR_N, 3, 0);
    check("both free, north lower");
    checks++; if (dir != DIR_N) failures++;
    set_cit(DIR_E, 2, 0); set_cit(DIR_N, 11, 0);
    check("north congested");
    checks++; if (dir != DIR_E || rcase != RC_ONE_CONG) failures++;
    set_cit(DIR_E, 10, 0); set_cit(DIR_N, 11, 0);
    check("north congested at threshold");
    checks++; if (dir != DIR_E) failures++;
    set_cit(DIR_E, 12, 4'b0010); set_cit(DIR_N, 14, 4'b0000);
    check("both congested, east next-door congested");
    checks++; if (dir != DIR_N || rcase != RC_ND_FREE) failures++;
    set_cit(DIR_E, 12, 4'b0010); set_cit(DIR_N, 14, 4'b0001);
    check("both congested, both next-door congested");
    checks++; if (dir != DIR_E || rcase != RC_ND_DELAY) failures++;
    cur = '{x: 2, y: 2};
    check("one hop left on each axis: next-door turns");
    cur = '{x: 3, y: 3};
    check("local");
    checks++; if (dir != DIR_L) failures++;
    cur = '{x: 0, y: 3};
    check("single");
    checks++; if (dir != DIR_E || rcase != RC_SINGLE) failures++;

    // random
    for (int i = 0; i < 20000; i++) begin
      cur = '{x: coord_t'($urandom_range(3)), y: coord_t'($urandom_range(3))};
      dst = '{x: coord_t'($urandom_range(3)), y: coord_t'($urandom_range(3))};
      for (int d = 0; d < NDIRS; d++) begin
        // bias towards the threshold region
        cit[d].delay_info = ($urandom_range(1)) ? 4'($urandom_range(9, 13)) : 4'($urandom);
        cit[d].nbr_status = 4'($urandom);
      end
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
