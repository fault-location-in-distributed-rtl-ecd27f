// Test of the fault locator with hand-made outcome records. Every case gives
// the per-PE setup/data outcomes of both phases (and of the retest where
// used) and the expected group, subgroup, kind and place, worked out from
// the paths: PE s uses link label s at every level in phase 1 and label
// {~s[3:k], s[k-1:0]} at level k in phase 2.
module tb_fault_locator;
  import dcn_pkg::*;

  localparam int N = 16;
  phase_rec_t rec_main [2][N];
  phase_rec_t rec_re   [2][N];
  logic       retest_valid, need_retest, need_search;
  logic [2:0] group, loc_level;
  logic [3:0] subgroup, loc_label, path_src;
  loc_kind_t  loc_kind;

  fault_locator dut (.*);

  int checks = 0, failures = 0;

  task automatic clear(input res_t data_res);
    retest_valid = 0;
    for (int p = 0; p < 2; p++)
      for (int s = 0; s < N; s++) begin
        rec_main[p][s] = '{RES_OK, data_res, 1'b0};
        rec_re[p][s]   = '{RES_OK, RES_OK, 1'b0};
      end
  endtask

  // all setups fine, data skipped in a phase with setup anomalies
  task automatic setup_fail(input int p, input int s, input res_t r);
    rec_main[p][s].setup = r;
    for (int t = 0; t < N; t++) rec_main[p][t].data = RES_NONE;
  endtask

  task automatic expect_loc(input string name, input int g, input int sg, input loc_kind_t k,
                            input int lv, input int lb);
    bit ok;
    #1;
    ok = (group == 3'(g)) && (sg == 0 || subgroup == 4'(sg)) && (loc_kind == k) &&
         ((k == LOC_NONE || k == LOC_PATH) || (loc_level == 3'(lv) && loc_label == 4'(lb)));
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s: got group %0d sub %0d %s level %0d label %0d", name, group, subgroup,
               loc_kind.name(), loc_level, loc_label);
    end
  endtask

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear(RES_OK);
    expect_loc("no anomaly", 5, 0, LOC_NONE, 0, 0);
    check(need_search && !need_retest, "group 5 asks for the search");

    clear(RES_OK); setup_fail(0, 0, RES_BLK); setup_fail(0, 4, RES_BLK);
    expect_loc("2B in phase 1", 1, 0, LOC_BOX, 2, 0);

    clear(RES_OK); rec_main[1][6].setup = RES_ERR; rec_main[1][7].setup = RES_ERR;
    for (int t = 0; t < N; t++) rec_main[1][t].data = RES_NONE;
    // phase 2 paths of 6 and 7 differ in bit 0 only: box stage 0, upper label {~6[3:1],6[0]}&~1
    expect_loc("2E in phase 2", 1, 0, LOC_BOX, 0, 8);

    clear(RES_OK); rec_main[0][5].data = RES_ERR; rec_main[1][9].data = RES_ERR;
    expect_loc("data error in both phases", 2, 0, LOC_LINK, 2, 5);

    clear(RES_OK); setup_fail(0, 2, RES_ERR); setup_fail(0, 10, RES_BLK); rec_main[1][2].data = RES_ERR;
    expect_loc("setup EB then data error", 2, 0, LOC_LINK, 4, 2);

    clear(RES_OK); setup_fail(1, 14, RES_ERR); setup_fail(1, 12, RES_BLK);
    expect_loc("EB in one phase only", 3, 0, LOC_BOX_OR_IN, 1, 0);

    clear(RES_OK); setup_fail(1, 3, RES_BLK);
    expect_loc("single block in one phase", 3, 0, LOC_PATH, 0, 0);
    check(path_src == 4'd3, "group 3 path source");

    clear(RES_OK); setup_fail(0, 6, RES_BLK); rec_main[0][6].illegal = 1;
    setup_fail(1, 8, RES_BLK); rec_main[1][8].illegal = 1;
    expect_loc("B,B with grant missing", 4, 9, LOC_LINK, 1, 6);

    clear(RES_OK); setup_fail(0, 12, RES_BLK); setup_fail(1, 4, RES_BLK);
    expect_loc("B,B", 4, 9, LOC_BOX_PAIR, 3, 12);

    clear(RES_OK); setup_fail(0, 3, RES_ERR); setup_fail(1, 13, RES_ERR);
    expect_loc("E,E before retest", 4, 1, LOC_BOX_PAIR, 1, 3);
    check(need_retest, "E,E asks for a retest");

    retest_valid = 1; rec_re[0][0].data = RES_ERR; rec_re[0][1].data = RES_ERR;
    expect_loc("E,E retest with 2E", 4, 1, LOC_BOX, 0, 0);
    check(!need_retest, "no second retest");

    rec_re[0][0].data = RES_OK; rec_re[0][1].data = RES_OK; rec_re[1][13].data = RES_ERR;
    expect_loc("E,E retest with one error", 4, 1, LOC_LINK, 1, 3);

    clear(RES_OK); setup_fail(0, 9, RES_ERR); setup_fail(1, 1, RES_ERR); setup_fail(1, 9, RES_BLK);
    expect_loc("E,EB", 4, 2, LOC_BOX_PAIR, 3, 9);

    clear(RES_OK); setup_fail(0, 5, RES_ERR); setup_fail(1, 5, RES_BLK);
    expect_loc("E,B at the input stage", 4, 3, LOC_BOX, 3, 5);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
