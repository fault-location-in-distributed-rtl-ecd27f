// Fault locator: turns the per-PE outcomes of the two test phases into a
// fault group and the location of the faulty component.
//
// Faulty paths of a phase: the paths whose setup ended in a routing/parity
// error (E) if there is any; otherwise the paths whose setup was blocked (B);
// otherwise the paths with an error in data transfer. A blocked path next to
// an erroneous one is taken to be blocked by a misrouted message and is not
// itself faulty. The path of PE s is s -> s in phase 1 and s -> ~s in phase 2;
// at level k it uses link {d[n-1:k], s[k-1:0]} (dcn_pkg::path_label).
//
// Groups, checked in this order:
//   5  no anomaly in either phase: the only single fault that hides is a grant
//      line stuck asserted; it needs a blocking-path search (need_search).
//   1  two (or more) faulty paths in one phase: only a box fault does this;
//      the two paths share exactly one box, which is reported.
//   3  no anomaly in one phase, one faulty path in the other. If that phase
//      has an error together with blocks (EB), the box shared by the error
//      path and a blocked path, the one nearest the network input, is
//      reported as "that box or one of its input links". Otherwise only the
//      path is known (LOC_PATH).
//   2  a phase whose setup was clean but whose data transfer failed: a link
//      fault; the one link shared by the two phases' faulty paths.
//   4  setup anomalies in both phases; subgroup = 3*c1 + c2 + 1 with
//      c = 0 for E, 1 for EB, 2 for B (1..9). Mixed subgroups are box faults:
//      the box(es) shared by the two faulty paths. Subgroup 1 (E,E) asks for a
//      retest that sends data despite the setup errors (need_retest): two
//      data errors in one retest phase then mean a box (as in group 1),
//      otherwise the shared link. Subgroup 9 (B,B) is a grant link when a
//      source saw data received without grant (illegal); otherwise, like
//      subgroup 5, the fault is narrowed to two boxes and their link.
// loc_level is a link level (n = input .. 0 = output) for LOC_LINK and
// LOC_BOX_PAIR (the boxes at stages loc_level and loc_level-1 on that link,
// and the link; at level n or 0 there is only one box on it),
// and a stage for LOC_BOX and LOC_BOX_OR_IN. loc_label is the link label, or
// the label of the box's upper line. path_src is the source PE of the first
// faulty path. Purely combinational.
module fault_locator
  import dcn_pkg::*;
#(
  parameter int unsigned N    = N_PE,
  parameter int unsigned LOGN = $clog2(N)
) (
  input  phase_rec_t rec_main [2][N],
  input  phase_rec_t rec_re   [2][N],
  input  logic       retest_valid,
  output logic [2:0] group,          // 0: nothing evaluated, 1..5
  output logic [3:0] subgroup,       // group 4 only, 1..9
  output loc_kind_t  loc_kind,
  output logic [$clog2(LOGN+1)-1:0] loc_level,
  output logic [LOGN-1:0] loc_label,
  output logic [LOGN-1:0] path_src,
  output logic       need_retest,
  output logic       need_search
);

  typedef logic [LOGN-1:0] lab_t;
  typedef logic [$clog2(LOGN+1)-1:0] lvl_t;

  // Destination of PE s in phase p.
  function automatic lab_t dest_of(input lab_t s, input logic p);
    return p ? ~s : s;
  endfunction

  function automatic lab_t lab(input lab_t s, input lab_t d, input int unsigned k);
    logic [N_STG-1:0] l;
    l = path_label(N_STG'(s), N_STG'(d), k);
    return l[LOGN-1:0];
  endfunction

  // Intersection of two paths (s1 in phase p1, s2 in phase p2):
  // link_hit/link_lvl: a shared link; box_hit/box_mask: stages with a shared box.
  typedef struct packed {
    logic                 link_hit;
    lvl_t                 link_lvl;
    lab_t                 link_lab;
    logic [LOGN-1:0]      box_mask;
  } isect_t;

  function automatic isect_t isect(input lab_t s1, input logic p1,
                                   input lab_t s2, input logic p2);
    isect_t r;
    lab_t d1, d2, a, b;
    r = '0;
    d1 = dest_of(s1, p1);
    d2 = dest_of(s2, p2);
    for (int k = 0; k <= LOGN; k++) begin
      if (lab(s1, d1, k) == lab(s2, d2, k) && !r.link_hit) begin
        r.link_hit = 1'b1;
        r.link_lvl = lvl_t'(k);
        r.link_lab = lab(s1, d1, k);
      end
    end
    for (int i = 0; i < LOGN; i++) begin
      a = lab(s1, d1, i + 1);
      b = lab(s2, d2, i + 1);
      a[i] = 1'b0;
      b[i] = 1'b0;
      r.box_mask[i] = (a == b);
    end
    return r;
  endfunction

  // Upper-line label of the box at stage i on path s in phase p.
  function automatic lab_t box_lab(input lab_t s, input logic p, input int unsigned i);
    lab_t l;
    l = lab(s, dest_of(s, p), i + 1);
    l[i] = 1'b0;
    return l;
  endfunction

  // Highest set stage in a mask.
  function automatic lvl_t top_stage(input logic [LOGN-1:0] m);
    lvl_t r;
    r = '0;
    for (int i = 0; i < LOGN; i++) if (m[i]) r = lvl_t'(i);
    return r;
  endfunction

  // ---- per-phase summaries ----
  logic [N-1:0] se [2], sb [2], de [2], fp [2], rde [2];
  logic [1:0]   nfp [2], nrde [2];     // saturating counts (0, 1, 2 = two or more)
  lab_t         f1 [2], f2 [2], r1 [2], r2 [2];
  logic         anom [2], set_anom [2];
  logic [1:0]   cond [2];              // 0 E, 1 EB, 2 B
  logic         illegal_any;

  always_comb begin
    illegal_any = 1'b0;
    for (int p = 0; p < 2; p++) begin
      for (int s = 0; s < N; s++) begin
        se[p][s]  = rec_main[p][s].setup == RES_ERR;
        sb[p][s]  = rec_main[p][s].setup == RES_BLK;
        de[p][s]  = rec_main[p][s].data  == RES_ERR;
        rde[p][s] = rec_re[p][s].data    == RES_ERR;
        if (rec_main[p][s].illegal) illegal_any = 1'b1;
      end
      fp[p]       = (|se[p]) ? se[p] : (|sb[p]) ? sb[p] : de[p];
      set_anom[p] = |se[p] || |sb[p];
      anom[p]     = set_anom[p] || |de[p];
      cond[p]     = (|se[p] && |sb[p]) ? 2'd1 : (|se[p]) ? 2'd0 : 2'd2;
      nfp[p] = '0; nrde[p] = '0;
      f1[p] = '0; f2[p] = '0; r1[p] = '0; r2[p] = '0;
      for (int s = N - 1; s >= 0; s--) begin
        if (fp[p][s])  begin f2[p] = f1[p]; f1[p] = lab_t'(s); end
        if (rde[p][s]) begin r2[p] = r1[p]; r1[p] = lab_t'(s); end
      end
      for (int s = 0; s < N; s++) begin
        if (fp[p][s]  && nfp[p]  != 2'd2) nfp[p]  = nfp[p]  + 2'd1;
        if (rde[p][s] && nrde[p] != 2'd2) nrde[p] = nrde[p] + 2'd1;
      end
    end
  end

  // Report the shared part of two paths as box, box pair or link.
  // may_link: the fault may be a link, so a shared box is reported together
  // with a shared link even at the network's edge (one box and its link).
  function automatic void report(input isect_t x, input logic link_fault,
                                 input logic may_link,
                                 input lab_t s, input logic p,
                                 output loc_kind_t k, output lvl_t lv, output lab_t lb);
    int unsigned nbox;
    nbox = 0;
    for (int i = 0; i < LOGN; i++) if (x.box_mask[i]) nbox++;
    if (link_fault && x.link_hit) begin
      k = LOC_LINK; lv = x.link_lvl; lb = x.link_lab;
    end else if ((nbox >= 2 || (may_link && nbox >= 1)) && x.link_hit) begin
      k = LOC_BOX_PAIR; lv = x.link_lvl; lb = x.link_lab;
    end else if (nbox >= 1) begin
      k = LOC_BOX; lv = top_stage(x.box_mask); lb = box_lab(s, p, 32'(top_stage(x.box_mask)));
    end else begin
      k = LOC_PATH; lv = '0; lb = s;
    end
  endfunction

  always_comb begin
    isect_t x;
    loc_kind_t k;
    lvl_t lv;
    lab_t lb;
    logic q;
    logic [LOGN-1:0] m;
    q = 1'b0;
    m = '0;
    group       = 3'd0;
    subgroup    = 4'd0;
    loc_kind    = LOC_NONE;
    loc_level   = '0;
    loc_label   = '0;
    path_src    = '0;
    need_retest = 1'b0;
    need_search = 1'b0;
    k = LOC_NONE; lv = '0; lb = '0; x = '0;
    if (!anom[0] && !anom[1]) begin
      group       = 3'd5;
      need_search = 1'b1;
    end else if (nfp[0] == 2'd2 || nfp[1] == 2'd2) begin
      group    = 3'd1;
      q        = (nfp[0] == 2'd2) ? 1'b0 : 1'b1;
      path_src = f1[q];
      x        = isect(f1[q], q, f2[q], q);
      report(x, 1'b0, 1'b0, f1[q], q, k, lv, lb);
    end else if (!anom[0] || !anom[1]) begin
      group    = 3'd3;
      q        = anom[1];
      path_src = f1[q];
      if (cond[q] == 2'd1 && set_anom[q]) begin
        // error path against every blocked path; keep the box nearest the input
        for (int s = 0; s < N; s++)
          if (sb[q][s]) m = m | isect(f1[q], q, lab_t'(s), q).box_mask;
        if (m != '0) begin
          k  = LOC_BOX_OR_IN;
          lv = top_stage(m);
          lb = box_lab(f1[q], q, 32'(top_stage(m)));
        end else begin
          k = LOC_PATH; lb = f1[q];
        end
      end else begin
        k = LOC_PATH; lb = f1[q];
      end
    end else if (!set_anom[0] || !set_anom[1]) begin
      group    = 3'd2;
      path_src = f1[0];
      x        = isect(f1[0], 1'b0, f1[1], 1'b1);
      report(x, 1'b1, 1'b0, f1[0], 1'b0, k, lv, lb);
    end else begin
      group    = 3'd4;
      subgroup = 4'(3 * 32'(cond[0]) + 32'(cond[1]) + 1);
      path_src = f1[0];
      x        = isect(f1[0], 1'b0, f1[1], 1'b1);
      if (subgroup == 4'd1) begin
        if (!retest_valid) begin
          need_retest = 1'b1;
          report(x, 1'b0, 1'b1, f1[0], 1'b0, k, lv, lb);
        end else if (nrde[0] == 2'd2 || nrde[1] == 2'd2) begin
          q = (nrde[0] == 2'd2) ? 1'b0 : 1'b1;
          report(isect(r1[q], q, r2[q], q), 1'b0, 1'b0, r1[q], q, k, lv, lb);
        end else begin
          report(x, 1'b1, 1'b0, f1[0], 1'b0, k, lv, lb);
        end
      end else if (subgroup == 4'd9 && illegal_any) begin
        report(x, 1'b1, 1'b0, f1[0], 1'b0, k, lv, lb);
      end else begin
        report(x, 1'b0, subgroup == 4'd5 || subgroup == 4'd9, f1[0], 1'b0, k, lv, lb);
      end
    end
    if (group != 3'd5) begin
      loc_kind  = k;
      loc_level = lv;
      loc_label = lb;
    end
  end

endmodule
