// End-to-end test of the network with built-in fault location, at the
// default size (16 PEs, 4 stages, 16-bit words).
//
// 1. Normal traffic: messages between PE pairs (setup, two data words,
//    release) with the received words checked at the destination, and a
//    deliberate conflict in one box that must be reported as a block.
// 2. Diagnosis of a fault-free network: group 5, every subphase OK.
// 3. A set of injected single faults, one at a time, each followed by a
//    diagnosis whose group and located component were worked out by hand
//    from the fault and the routing rule (path of PE s in phase 1: label s
//    at every level; in phase 2: {~s[3:k], s[k-1:0]} at level k).
// 4. An automatic diagnosis started by a failed normal message.
// 5. A grant line stuck asserted: undetected by the two phases, located by
//    the grant search that follows an automatic diagnosis.
// Mechanism counters (blocks, routing errors, data errors, illegal grant
// combination, retest, each group, automatic start) must all be non-zero.
module tb_dcn_fault_top;
  import dcn_pkg::*;

  localparam int N = 16;
  localparam logic [1:0] OP_SETUP = 2'd1, OP_SEND = 2'd2, OP_RELEASE = 2'd3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]  pe_cmd_valid;
  logic [1:0]    pe_cmd_op   [N];
  logic [15:0]   pe_cmd_word [N];
  logic [N-1:0]  pe_done, pe_illegal, rx_valid, rx_is_tag, rx_par_ok, rx_addr_ok;
  res_t          pe_res [N];
  logic [15:0]   rx_word [N];
  logic          diag_start, auto_diag, diag_busy, diag_done;
  logic [3:0]    trig_src, trig_dest, flt_label, flt_path_src;
  logic [2:0]    flt_group, flt_level;
  logic [3:0]    flt_subgroup;
  loc_kind_t     flt_kind;
  logic          flt_retested, need_search;
  logic          search_busy, search_done;
  logic [2:0]    search_level, search_trials;
  logic [3:0]    search_label;
  phase_rec_t    rec_main [2][N];
  logic          lnk_flt_en, lnk_flt_val, box_flt_en, ow_val;
  logic [2:0]    lnk_flt_level;
  logic [3:0]    lnk_flt_label, box_flt_label, box_flt_s10, box_flt_s5;
  logic [4:0]    lnk_flt_sig;
  logic [1:0]    box_flt_stage;
  logic [3:0]    box_state [32];

  dcn_fault_top dut (.*);

  int checks = 0, failures = 0;
  int n_search = 0;
  int n_ok = 0, n_blk = 0, n_err = 0, n_derr = 0, n_illegal = 0, n_retest = 0, n_auto = 0;
  int n_group [6] = '{default: 0};

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic clear_faults();
    lnk_flt_en = 0; lnk_flt_val = 0; lnk_flt_level = 0; lnk_flt_label = 0; lnk_flt_sig = 0;
    box_flt_en = 0; box_flt_stage = 0; box_flt_label = 0; box_flt_s10 = 4'd10; box_flt_s5 = 4'd5;
    ow_val = 0;
  endtask

  // Issue one command to a set of PEs and wait for all of them to finish.
  task automatic pe_cmd(input logic [N-1:0] who, input logic [1:0] op,
                        input logic [15:0] words [N], output res_t r [N]);
    logic [N-1:0] pend;
    int guard;
    for (int s = 0; s < N; s++) begin
      pe_cmd_op[s] = op;
      pe_cmd_word[s] = words[s];
      r[s] = RES_NONE;
    end
    @(negedge clk);
    pe_cmd_valid = who;
    clr_done = 1'b1;
    @(negedge clk);
    pe_cmd_valid = '0;
    clr_done = 1'b0;
    pend = who;
    guard = 0;
    while (pend != 0 && guard < 1000) begin
      @(negedge clk);
      for (int s = 0; s < N; s++)
        if (pend[s] && done_seen[s]) begin pend[s] = 0; r[s] = res_seen[s]; end
      guard++;
    end
    check(pend == 0, "PE command finished");
  endtask

  // Sticky record of done pulses and results, cleared when a command is issued.
  logic [N-1:0] done_seen;
  res_t         res_seen [N];
  logic         clr_done = 1'b0;
  always @(posedge clk) begin
    for (int s = 0; s < N; s++) begin
      if (clr_done) done_seen[s] <= 1'b0;
      else if (pe_done[s]) begin done_seen[s] <= 1'b1; res_seen[s] <= pe_res[s]; end
    end
  end

  // Received-word monitor for normal traffic.
  logic [15:0] got_word [N][3];
  int          got_n [N];
  logic        got_bad [N];
  always @(posedge clk) begin
    for (int s = 0; s < N; s++)
      if (rx_valid[s]) begin
        if (got_n[s] < 3) got_word[s][got_n[s]] <= rx_word[s];
        got_n[s] <= got_n[s] + 1;
        if (!rx_par_ok[s] || (rx_is_tag[s] && !rx_addr_ok[s])) got_bad[s] <= 1'b1;
      end
  end

  task automatic run_diag(input string name, input int grp, input int sub,
                          input loc_kind_t kind, input int lvl, input int lab);
    int guard;
    @(negedge clk);
    diag_start = 1;
    @(negedge clk);
    diag_start = 0;
    guard = 0;
    while (!diag_done && guard < 20000) begin @(posedge clk); guard++; end
    #1;
    check(diag_done, {name, ": diagnosis finished"});
    check(flt_group == 3'(grp), $sformatf("%s: group %0d expected %0d", name, flt_group, grp));
    if (sub != 0) check(flt_subgroup == 4'(sub), $sformatf("%s: subgroup %0d expected %0d", name, flt_subgroup, sub));
    check(flt_kind == kind, $sformatf("%s: kind %s expected %s", name, flt_kind.name(), kind.name()));
    if (kind != LOC_NONE && kind != LOC_PATH) begin
      check(flt_level == 3'(lvl), $sformatf("%s: level %0d expected %0d", name, flt_level, lvl));
      check(flt_label == 4'(lab), $sformatf("%s: label %0d expected %0d", name, flt_label, lab));
    end
    count_records();
    if (flt_retested) n_retest++;
    n_group[flt_group]++;
    $display("%s: group %0d sub %0d kind %s level %0d label %0d retest %0d",
             name, flt_group, flt_subgroup, flt_kind.name(), flt_level, flt_label, flt_retested);
  endtask

  task automatic count_records();
    for (int p = 0; p < 2; p++)
      for (int s = 0; s < N; s++) begin
        if (rec_main[p][s].setup == RES_BLK) n_blk++;
        if (rec_main[p][s].setup == RES_ERR) n_err++;
        if (rec_main[p][s].data  == RES_ERR) n_derr++;
        if (rec_main[p][s].illegal) n_illegal++;
      end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w [N];
    res_t r [N];
    logic [3:0] dst [N];
    pe_cmd_valid = '0;
    diag_start = 0;
    auto_diag = 0;
    for (int s = 0; s < N; s++) begin pe_cmd_op[s] = 0; pe_cmd_word[s] = 0; got_n[s] = 0; got_bad[s] = 0; end
    clear_faults();
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- 1. normal traffic: permutation s -> (s + 5) mod 16 for PEs 0..3
    for (int s = 0; s < N; s++) begin
      dst[s] = 4'((s + 5) % N);
      w[s] = {12'h0, dst[s]};
    end
    pe_cmd(16'h000F, OP_SETUP, w, r);
    for (int s = 0; s < 4; s++) begin
      check(r[s] == RES_OK, $sformatf("normal setup PE %0d", s));
      if (r[s] == RES_OK) n_ok++;
    end
    for (int s = 0; s < N; s++) w[s] = 16'hA500 + 16'(s);
    pe_cmd(16'h000F, OP_SEND, w, r);
    for (int s = 0; s < 4; s++) check(r[s] == RES_OK, $sformatf("normal word 1 PE %0d", s));
    for (int s = 0; s < N; s++) w[s] = 16'h5A00 + 16'(s * 3);
    pe_cmd(16'h000F, OP_SEND, w, r);
    for (int s = 0; s < 4; s++) check(r[s] == RES_OK, $sformatf("normal word 2 PE %0d", s));
    pe_cmd(16'h000F, OP_RELEASE, w, r);
    repeat (4) @(posedge clk);
    for (int s = 0; s < 4; s++) begin
      int d;
      d = (s + 5) % N;
      check(got_n[d] == 3 && !got_bad[d], $sformatf("dest %0d got 3 good words", d));
      check(got_word[d][0] == 16'(d) && got_word[d][1] == 16'hA500 + 16'(s) &&
            got_word[d][2] == 16'h5A00 + 16'(s * 3), $sformatf("dest %0d words", d));
    end

    // ---- conflict: PEs 0 and 8 share the stage-3 box; both want the upper output
    w[0] = 16'h0001; w[8] = 16'h0003;
    pe_cmd(16'h0101, OP_SETUP, w, r);
    check(r[0] == RES_OK, "conflict: upper input wins");
    check(r[8] == RES_BLK, "conflict: lower input blocked");
    if (r[8] == RES_BLK) n_blk++;
    pe_cmd(16'h0101, OP_RELEASE, w, r);
    repeat (10) @(posedge clk);

    // ---- 2. fault-free diagnosis
    run_diag("fault-free", 5, 0, LOC_NONE, 0, 0);
    begin
      bit all_ok = 1;
      for (int p = 0; p < 2; p++)
        for (int s = 0; s < N; s++)
          if (rec_main[p][s].setup != RES_OK || rec_main[p][s].data != RES_OK) all_ok = 0;
      check(all_ok, "fault-free: every setup and transfer OK");
      check(need_search, "fault-free: group 5 asks for a search");
    end

    // ---- 3. injected faults
    // unused data bit 10 stuck at 0, link level 2 label 5: data errors only
    clear_faults(); lnk_flt_en = 1; lnk_flt_level = 2; lnk_flt_label = 5; lnk_flt_sig = 10; lnk_flt_val = 0;
    run_diag("unused bit s-a-0", 2, 0, LOC_LINK, 2, 5);
    check(rec_main[0][5].setup == RES_OK && rec_main[0][5].data == RES_ERR, "unused bit: PE 5 phase 1 data error");
    check(rec_main[1][9].data == RES_ERR, "unused bit: PE 9 phase 2 data error");

    // routing bit 3 stuck at 1 at the network input of PE 2: misroute in phase 1
    clear_faults(); lnk_flt_en = 1; lnk_flt_level = 4; lnk_flt_label = 2; lnk_flt_sig = 3; lnk_flt_val = 1;
    run_diag("routing bit s-a-1", 2, 0, LOC_LINK, 4, 2);
    check(rec_main[0][2].setup == RES_ERR && rec_main[0][10].setup == RES_BLK, "routing bit: EB in phase 1");

    // parity bit 1 stuck at 1, link level 1 label 3: errors in setup of both phases
    clear_faults(); lnk_flt_en = 1; lnk_flt_level = 1; lnk_flt_label = 3; lnk_flt_sig = 5'(SIG_PAR0 + 1); lnk_flt_val = 1;
    // phase 1 PE 3, phase 2 PE 13 (level 1 label {~s[3:1], s[0]} = 3); they share link 1/3
    run_diag("parity s-a-1", 4, 1, LOC_LINK, 1, 3);

    // grant stuck negated, link level 1 label 6: block in both phases with DRCV
    clear_faults(); lnk_flt_en = 1; lnk_flt_level = 1; lnk_flt_label = 6; lnk_flt_sig = 5'(SIG_GRANT); lnk_flt_val = 0;
    run_diag("grant s-a-0", 4, 9, LOC_LINK, 1, 6);
    check(rec_main[0][6].illegal && rec_main[1][8].illegal, "grant s-a-0: data received without grant");

    // request stuck negated, link level 3 label 12: block in both phases
    clear_faults(); lnk_flt_en = 1; lnk_flt_level = 3; lnk_flt_label = 12; lnk_flt_sig = 5'(SIG_REQ); lnk_flt_val = 0;
    run_diag("request s-a-0", 4, 9, LOC_BOX_PAIR, 3, 12);

    // data available stuck asserted before stage 0, link level 2 label 9
    clear_faults(); lnk_flt_en = 1; lnk_flt_level = 2; lnk_flt_label = 9; lnk_flt_sig = 5'(SIG_DAV); lnk_flt_val = 1;
    // phase 1 PE 9; phase 2 level-2 label {~s[3:2], s[1:0]} = 9 -> PE 5
    run_diag("DAV s-a-1", 2, 0, LOC_LINK, 2, 9);
    check(rec_main[0][9].setup == RES_OK && rec_main[0][9].data == RES_ERR, "DAV s-a-1: setup OK, data error");

    // data received stuck negated at the destination side, link level 0 label 7
    clear_faults(); lnk_flt_en = 1; lnk_flt_level = 0; lnk_flt_label = 7; lnk_flt_sig = 5'(SIG_DRCV); lnk_flt_val = 0;
    // phase 1 PE 7, phase 2 PE 8 (destination 7): error in both setups
    run_diag("DRCV s-a-0", 4, 1, LOC_LINK, 0, 7);

    // grant stuck asserted: undetectable by the two phases
    clear_faults(); lnk_flt_en = 1; lnk_flt_level = 2; lnk_flt_label = 4; lnk_flt_sig = 5'(SIG_GRANT); lnk_flt_val = 1;
    run_diag("grant s-a-1", 5, 0, LOC_NONE, 0, 0);

    // box stage 2, lines 0/4, takes S0 when straight is asked: 2B in phase 1
    clear_faults(); box_flt_en = 1; box_flt_stage = 2; box_flt_label = 0; box_flt_s10 = 4'd0;
    run_diag("box S0 for S10", 1, 0, LOC_BOX, 2, 0);

    // box stage 1, lines 0/2, takes broadcast S3 when exchange is asked:
    // phase 2 PEs 12 (blocked) and 14 (misrouted copy): EB, group 3
    clear_faults(); box_flt_en = 1; box_flt_stage = 1; box_flt_label = 0; box_flt_s5 = 4'd3;
    run_diag("box S3 for S5", 3, 0, LOC_BOX_OR_IN, 1, 0);
    check(rec_main[1][14].setup == RES_ERR && rec_main[1][12].setup == RES_BLK, "box S3: EB on PEs 14/12");

    // box stage 0, lines 0/1, S13 for straight and S11 for exchange, overwrite 0:
    // one error in each setup (subgroup 1); the retest shows two data errors
    clear_faults(); box_flt_en = 1; box_flt_stage = 0; box_flt_label = 0;
    box_flt_s10 = 4'd13; box_flt_s5 = 4'd11; ow_val = 0;
    run_diag("box S13/S11", 4, 1, LOC_BOX, 0, 0);
    check(flt_retested, "box S13/S11: retest ran");

    // box stage 3, lines 1/9, wrong in both phases: S1 for straight, S8 for exchange
    clear_faults(); box_flt_en = 1; box_flt_stage = 3; box_flt_label = 1; box_flt_s10 = 4'd1; box_flt_s5 = 4'd8;
    // phase 1 (S1, lower->upper only): PE 1 blocked, PE 9 misrouted to
    // destination 1 (EB). Phase 2 (S8, upper->upper only): PE 1 misrouted to
    // destination 6 (E), PE 9 blocked (EB). Subgroup 5: the error paths of
    // PE 9 (phase 1) and PE 1 (phase 2) share link 3/9, so only the pair of
    // boxes on that link (stages 3 and 2) can be named.
    run_diag("box S1/S8", 4, 5, LOC_BOX_PAIR, 3, 9);

    // ---- 4. automatic diagnosis from a failed message (grant s-a-0 on PE 6's path)
    clear_faults(); lnk_flt_en = 1; lnk_flt_level = 1; lnk_flt_label = 6; lnk_flt_sig = 5'(SIG_GRANT); lnk_flt_val = 0;
    auto_diag = 1;
    w[6] = 16'h0006;
    pe_cmd(16'h0040, OP_SETUP, w, r);
    check(r[6] == RES_BLK, "auto: message blocked");
    begin
      int guard = 0;
      @(posedge clk);
      #1;
      check(diag_busy, "auto: diagnosis started");
      while (!diag_done && guard < 20000) begin @(posedge clk); guard++; end
      #1;
      if (diag_done) n_auto++;
    end
    check(trig_src == 4'd6 && trig_dest == 4'd6, "auto: trigger recorded");
    check(flt_group == 3'd4 && flt_kind == LOC_LINK && flt_level == 3'd1 && flt_label == 4'd6, "auto: link located");
    auto_diag = 0;

    // ---- 5. grant stuck asserted at level 3 label 0 (between stages 3 and 2 on
    // the path 0 -> 4). PE 4 holds 4 -> 4; PE 0's request for 4 is blocked at
    // stage 2 but sees the stuck grant: routing error, automatic diagnosis,
    // group 5, then the search must name link 3/0 in three trials.
    clear_faults(); lnk_flt_en = 1; lnk_flt_level = 3; lnk_flt_label = 0; lnk_flt_sig = 5'(SIG_GRANT); lnk_flt_val = 1;
    w[4] = 16'h0004;
    pe_cmd(16'h0010, OP_SETUP, w, r);
    check(r[4] == RES_OK, "search: path 4 -> 4 held");
    auto_diag = 1;
    w[0] = 16'h0004;
    pe_cmd(16'h0001, OP_SETUP, w, r);
    check(r[0] == RES_ERR, "search: blocked request reported as routing error");
    begin
      int guard = 0;
      while (!search_done && guard < 40000) begin @(posedge clk); guard++; end
      #1;
    end
    auto_diag = 0;
    check(flt_group == 3'd5 && need_search, "search: diagnosis found nothing (group 5)");
    check(search_done && search_level == 3'd3 && search_label == 4'd0,
          $sformatf("search: link %0d/%0d expected 3/0", search_level, search_label));
    check(search_trials == 3'd3, "search: three trials");
    if (search_done) n_search++;

    // ---- mechanism coverage
    $display("mechanisms: search=%0d ok=%0d block=%0d setup_err=%0d data_err=%0d illegal=%0d retest=%0d auto=%0d",
             n_search, n_ok, n_blk, n_err, n_derr, n_illegal, n_retest, n_auto);
    check(n_ok > 0, "coverage: normal message");
    check(n_blk > 0, "coverage: block");
    check(n_err > 0, "coverage: setup error");
    check(n_derr > 0, "coverage: data transfer error");
    check(n_illegal > 0, "coverage: grant/data-received inconsistency");
    check(n_retest > 0, "coverage: retest");
    check(n_auto > 0, "coverage: automatic start");
    check(n_search > 0, "coverage: grant search");
    for (int g = 1; g <= 5; g++) check(n_group[g] > 0, $sformatf("coverage: group %0d", g));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
