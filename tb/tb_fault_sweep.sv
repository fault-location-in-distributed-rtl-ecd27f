// Fault-coverage sweep at the default size: every single link fault (each of
// the 22 lines of each of the 80 links stuck at 0 and at 1) and every single
// box fault (each of the 32 boxes taking each of the 15 wrong states when
// straight is requested, and each of the 15 when exchange is requested, with
// both overwrite values) is injected in turn and the two-phase diagnosis is
// run. Each report is compared with the injected fault:
//   exact     the named link or box is the faulty one
//   narrowed  the fault lies in the named box pair with its link, in the box
//             or its input links, or on the named path; for a request line
//             stuck asserted, the named place lies on the path the stuck line
//             keeps held below it (that path is set up before the fault is
//             injected, as the line only holds what was already connected)
//   adjacent  a box is named for a link fault on one of its links, or a
//             link for a box fault on one of its links
//   wrong     the named place does not touch the fault
//   hidden    nothing detected (group 5)
// The procedure cannot see a grant line stuck asserted, nor a request line
// stuck asserted between the last stage and a destination port (no box lies
// after it to hold); a hidden fault of any other kind, or a wrong report,
// counts as a failure. The per-class totals are printed.
//
// Every grant line stuck asserted is then injected again and located end to
// end: a normal message fails on it, the automatic diagnosis finds nothing,
// and the grant search must name the link.
//
// Each fault is also checked to land in the fault group that the error
// analysis gives for it: for a link fault, from the kind of line, its stuck
// value and its place (an unused tag bit, a routing bit already used or
// still to be used, parity, or one of the four protocol lines before or
// after the edge stages); for a box fault wrong in one phase, two faulty
// paths (group 1) or one (group 3) by the state it takes.
module tb_fault_sweep;
  import dcn_pkg::*;

  localparam int N = 16;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]  pe_cmd_valid = '0;
  logic [1:0]    pe_cmd_op   [N];
  logic [15:0]   pe_cmd_word [N];
  logic [N-1:0]  pe_done, pe_illegal, rx_valid, rx_is_tag, rx_par_ok, rx_addr_ok;
  res_t          pe_res [N];
  logic [15:0]   rx_word [N];
  logic          diag_start = 1'b0, auto_diag = 1'b0, diag_busy, diag_done;
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
  int n_exact = 0, n_narrow = 0, n_adj = 0, n_wrong = 0, n_hidden = 0, n_hidden_ok = 0;
  int n_group [6] = '{default: 0};
  int n_printed = 0;
  int n_grp_bad = 0;
  int n_found = 0;

  // link label at level k on the path of PE s in phase p
  function automatic int plab(input int s, input int p, input int k);
    int d = p ? (~s & 15) : s;
    int hm = (16 - (1 << k)) & 15;
    return (d & hm) | (s & ~hm & 15);
  endfunction

  function automatic bit link_on_path(input int s, input int k, input int l);
    return plab(s, 0, k) == l || plab(s, 1, k) == l;
  endfunction

  // box (stage i, upper label u) on the path of PE s in either phase
  function automatic bit box_on_path(input int s, input int i, input int u);
    return ((plab(s, 0, i + 1) & ~(1 << i)) == u) || ((plab(s, 1, i + 1) & ~(1 << i)) == u);
  endfunction

  // link (k, l) touches box (i, u): input link (level i+1) or output link (level i)
  function automatic bit link_at_box(input int k, input int l, input int i, input int u);
    return (k == i + 1 || k == i) && ((l & ~(1 << i)) == u);
  endfunction

  task automatic diagnose();
    int guard = 0;
    @(negedge clk);
    diag_start = 1;
    @(negedge clk);
    diag_start = 0;
    while (!diag_done && guard < 20000) begin @(posedge clk); guard++; end
    #1;
    if (!diag_done) begin failures++; $display("FAIL: diagnosis did not finish"); end
    n_group[flt_group]++;
  endtask

  // Normal-mode path from PE s to PE d, left held.
  task automatic hold_path(input int s, input int d);
    @(negedge clk);
    pe_cmd_op[s] = 2'd1;
    pe_cmd_word[s] = 16'(d);
    pe_cmd_valid[s] = 1'b1;
    @(negedge clk);
    pe_cmd_valid[s] = 1'b0;
    repeat (100) @(posedge clk);
  endtask

  // Group (and group-4 subgroup) expected for a link fault, from the kind of
  // line and where it sits. The link at level k carries the tag bits of
  // label l in both phases above the routing bits already used (bits >= k),
  // and complementary values in the two phases below (bits < k).
  function automatic bit link_group_ok(input int k, input int l, input int sig, input int v);
    bit g2, s1, s9;
    g2 = flt_group == 3'd2;
    s1 = flt_group == 3'd4 && flt_subgroup == 4'd1;
    s9 = flt_group == 3'd4 && flt_subgroup == 4'd9;
    if (sig >= N_STG && sig < M_BITS) return v ? s1 : g2;     // unused tag bit
    if (sig < N_STG) begin
      if (sig < k) return g2;                                // bit still to be routed on
      return (v != ((l >> sig) & 1)) ? s1 : g2;              // bit already routed on
    end
    if (sig < M_BITS + P_BITS) return g2 || s1;              // parity line
    case (sig)
      // Stuck asserted, the request line keeps the path it was part of. The
      // analysis expects the misrouted setup word that then reaches the held
      // destination to be caught there as a routing error (group 3 for an
      // all-straight or all-exchange held path, group 4 subgroup 5 for a
      // mixed one). A destination port recognises a routing tag as the first
      // word after REQ rises, which the stuck line hides: the word is taken
      // as data and the error shows as a further block instead, giving
      // group 1 or another group-4 subgroup. The location is checked by
      // classify_held either way.
      SIG_REQ:   return v ? (k == 0 ? flt_group == 3'd5 : flt_group inside {3'd1, 3'd3, 3'd4}) : s9;
      SIG_GRANT: return v ? flt_group == 3'd5 : s9;
      SIG_DAV:   return (v && k > 0) ? g2 : s1;
      SIG_DRCV:  return (v && k < N_STG) ? g2 : s1;
      default:   return 1'b0;
    endcase
  endfunction

  // Group expected for a box that is wrong in one phase only: two faulty
  // paths in that phase (group 1) or one (group 3), by the state it takes.
  // States whose outcome depends on which bits the overwrite hits (S7 and
  // S13 for a straight request, S11 and S14 for an exchange request) may
  // give either.
  function automatic bit group_ok(input int want, input int st);
    bit [15:0] g1, g3;
    g3 = 16'b0001_0001_0001_1110;  // S1 S2 S3 S4 S8 S12
    g1 = want ? 16'b1010_0110_1100_0001   // S0 S6 S7 S9 S10 S13 S15 (+S11/S14 either)
              : 16'b1110_1010_1110_0001;  // S0 S5 S6 S9 S11 S14 S15 (+S7/S13 either)
    if (want ? (st == 11 || st == 14) : (st == 7 || st == 13))
      return flt_group == 3'd1 || flt_group == 3'd3;
    if (g1[st]) return flt_group == 3'd1;
    if (g3[st]) return flt_group == 3'd3;
    return 1'b0;
  endfunction

  task automatic note(input string what, input int cls, input bit may_hide);
    // cls: 0 exact, 1 narrowed, 2 adjacent, 3 wrong, 4 hidden
    checks++;
    case (cls)
      0: n_exact++;
      1: n_narrow++;
      2: n_adj++;
      3: n_wrong++;
      default: if (may_hide) n_hidden_ok++; else n_hidden++;
    endcase
    if (cls == 3 || (cls == 4 && !may_hide)) begin
      failures++;
      if (n_printed < 60) begin
        n_printed++;
        $display("FAIL: %s -> group %0d sub %0d %s level %0d label %0d src %0d", what, flt_group,
                 flt_subgroup, flt_kind.name(), flt_level, flt_label, flt_path_src);
      end
    end
  endtask

  // link label at level k on the path from s to d
  function automatic int sdlab(input int s, input int d, input int k);
    int hm = (16 - (1 << k)) & 15;
    return (d & hm) | (s & ~hm & 15);
  endfunction

  // Region affected by a request line stuck asserted on link (k, l): the
  // held path from s to d below level k (its boxes and links).
  function automatic int classify_held(input int k, input int s, input int d);
    bit in_box [4][16];
    bit in_lnk [5][16];
    in_box = '{default: 0};
    in_lnk = '{default: 0};
    for (int j = 0; j <= k; j++) in_lnk[j][sdlab(s, d, j)] = 1;
    for (int i = 0; i < k; i++) in_box[i][sdlab(s, d, i + 1) & ~(1 << i)] = 1;
    if (flt_group == 3'd5) return 4;
    case (flt_kind)
      LOC_BOX, LOC_BOX_OR_IN: return in_box[flt_level][flt_label] ? 1 : 3;
      LOC_LINK:     return in_lnk[flt_level][flt_label] ? 1 : 3;
      LOC_BOX_PAIR: return (in_lnk[flt_level][flt_label] ||
                            (flt_level < 4 && in_box[flt_level][flt_label & ~(1 << flt_level)]) ||
                            (flt_level > 0 && in_box[flt_level - 1][flt_label & ~(1 << (flt_level - 1))])) ? 1 : 3;
      LOC_PATH: begin
        for (int i = 0; i < k; i++)
          for (int p = 0; p < 2; p++)
            if (in_box[i][plab(int'(flt_path_src), p, i + 1) & ~(1 << i)]) return 1;
        return 3;
      end
      default: return 3;
    endcase
  endfunction

  function automatic int classify_link(input int k, input int l);
    if (flt_group == 3'd5) return 4;
    case (flt_kind)
      LOC_LINK:      return (flt_level == 3'(k) && flt_label == 4'(l)) ? 0 : 3;
      LOC_BOX_PAIR:  return (flt_level == 3'(k) && flt_label == 4'(l)) ? 1 :
                            ((link_at_box(k, l, int'(flt_level), int'(flt_label) & ~(1 << flt_level)) ||
                              (flt_level > 0 && link_at_box(k, l, int'(flt_level) - 1,
                                                            int'(flt_label) & ~(1 << (flt_level - 1))))) ? 2 : 3);
      LOC_BOX_OR_IN: return (k == int'(flt_level) + 1 && link_at_box(k, l, int'(flt_level), int'(flt_label))) ? 1 :
                            link_at_box(k, l, int'(flt_level), int'(flt_label)) ? 2 : 3;
      LOC_BOX:       return link_at_box(k, l, int'(flt_level), int'(flt_label)) ? 2 : 3;
      LOC_PATH:      return link_on_path(int'(flt_path_src), k, l) ? 1 : 3;
      default:       return 3;
    endcase
  endfunction

  function automatic int classify_box(input int i, input int u);
    if (flt_group == 3'd5) return 4;
    case (flt_kind)
      LOC_BOX, LOC_BOX_OR_IN:
        return (flt_level == 3'(i) && flt_label == 4'(u)) ? 0 : 3;
      LOC_BOX_PAIR: begin
        int lv = int'(flt_level), lb = int'(flt_label);
        if ((lv == i && (lb & ~(1 << i)) == u) || (lv == i + 1 && (lb & ~(1 << i)) == u)) return 1;
        return 3;
      end
      LOC_LINK:      return link_at_box(int'(flt_level), int'(flt_label), i, u) ? 2 : 3;
      LOC_PATH:      return box_on_path(int'(flt_path_src), i, u) ? 1 : 3;
      default:       return 3;
    endcase
  endfunction

  initial begin : watchdog
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < N; s++) begin pe_cmd_op[s] = 0; pe_cmd_word[s] = 0; end
    lnk_flt_en = 0; lnk_flt_val = 0; lnk_flt_level = 0; lnk_flt_label = 0; lnk_flt_sig = 0;
    box_flt_en = 0; box_flt_stage = 0; box_flt_label = 0; box_flt_s10 = 4'd10; box_flt_s5 = 4'd5; ow_val = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // link faults
    for (int k = 0; k <= 4; k++)
      for (int l = 0; l < N; l++)
        for (int sig = 0; sig < int'(N_SIG); sig++)
          for (int v = 0; v < 2; v++) begin
            // A request line that sticks asserted keeps the path that was
            // using it; set one up first: all straight for even labels,
            // exchange in stage 0 only (mixed below level 2) for odd ones.
            int hm, hd;
            hm = (16 - (1 << k)) & 15;
            hd = (l & hm) | ((l[0] ? l ^ 1 : l) & ~hm & 15);
            if (sig == int'(SIG_REQ) && v == 1) hold_path(l, hd);
            lnk_flt_en = 1; lnk_flt_level = 3'(k); lnk_flt_label = 4'(l);
            lnk_flt_sig = 5'(sig); lnk_flt_val = 1'(v);
            diagnose();
            checks++;
            if (!link_group_ok(k, l, sig, v)) begin
              failures++;
              n_grp_bad++;
              if (n_printed < 60) begin
                n_printed++;
                $display("FAIL: link %0d/%0d line %0d s-a-%0d -> group %0d sub %0d", k, l, sig, v,
                         flt_group, flt_subgroup);
              end
            end
            note($sformatf("link %0d/%0d line %0d s-a-%0d", k, l, sig, v),
                 (sig == int'(SIG_REQ) && v == 1) ? classify_held(k, l, hd) : classify_link(k, l),
                 (sig == int'(SIG_GRANT) || (sig == int'(SIG_REQ) && k == 0)) && v == 1);
          end
    lnk_flt_en = 0;

    // box faults
    for (int i = 0; i < 4; i++)
      for (int b = 0; b < 8; b++)
        for (int want = 0; want < 2; want++)
          for (int st = 0; st < 16; st++)
            for (int ov = 0; ov < 2; ov++) begin
              int u;
              if (st == (want ? 5 : 10)) continue;
              u = ((b >> i) << (i + 1)) | (b & ((1 << i) - 1));
              box_flt_en = 1; box_flt_stage = 2'(i); box_flt_label = 4'(u);
              box_flt_s10 = want ? 4'd10 : 4'(st);
              box_flt_s5  = want ? 4'(st) : 4'd5;
              ow_val = 1'(ov);
              diagnose();
              note($sformatf("box %0d/%0d S%0d for %s ow %0d", i, u, st, want ? "S5" : "S10", ov),
                   classify_box(i, u), 1'b0);
              checks++;
              if (!group_ok(want, st)) begin
                failures++;
                n_grp_bad++;
                if (n_printed < 60) begin
                  n_printed++;
                  $display("FAIL: box %0d/%0d S%0d for %s ow %0d -> group %0d", i, u, st,
                           want ? "S5" : "S10", ov, flt_group);
                end
              end
            end
    box_flt_en = 0;

    // grant lines stuck asserted, found by the search that follows an
    // automatic diagnosis: PE l^1 holds a path to l, then PE l asks for l and
    // is blocked in stage 0; through the stuck line it still sees a grant
    // (routing error) or, for a level-0 link, a block. Either starts the
    // diagnosis, which finds nothing (group 5), and the search must name
    // link (k, l), the link of path l -> l at level k.
    for (int k = 0; k <= 4; k++)
      for (int l = 0; l < N; l++) begin
        int guard;
        lnk_flt_en = 1; lnk_flt_level = 3'(k); lnk_flt_label = 4'(l);
        lnk_flt_sig = 5'(SIG_GRANT); lnk_flt_val = 1'b1;
        hold_path(l ^ 1, l);
        auto_diag = 1;
        hold_path(l, l);
        guard = 0;
        // search_done holds the previous result until the next search starts
        while (!search_busy && guard < 40000) begin @(posedge clk); guard++; end
        while (!search_done && guard < 40000) begin @(posedge clk); guard++; end
        #1;
        auto_diag = 0;
        checks++;
        if (!(search_done && flt_group == 3'd5 && search_level == 3'(k) && search_label == 4'(l))) begin
          failures++;
          if (n_printed < 60) begin
            n_printed++;
            $display("FAIL: grant %0d/%0d stuck asserted -> group %0d, search %0d %0d/%0d", k, l,
                     flt_group, search_done, search_level, search_label);
          end
        end else n_found++;
        // let the search's last release settle before the next fault
        repeat (20) @(posedge clk);
      end
    lnk_flt_en = 0;

    $display("sweep: exact=%0d narrowed=%0d adjacent=%0d wrong=%0d hidden=%0d expected hidden=%0d",
             n_exact, n_narrow, n_adj, n_wrong, n_hidden, n_hidden_ok);
    $display("grant lines stuck asserted located by the search: %0d of 80", n_found);
    $display("faults in a group other than the one the analysis gives: %0d", n_grp_bad);
    $display("groups: 1=%0d 2=%0d 3=%0d 4=%0d 5=%0d", n_group[1], n_group[2], n_group[3], n_group[4], n_group[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
