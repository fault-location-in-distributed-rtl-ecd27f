// Distributed-control generalized cube network with built-in fault location.
//
// N PEs (default 16) are joined by an n-stage generalized cube network of
// 2x2 interchange boxes that set themselves from destination-address routing
// tags. Each PE has a source port (parity generation, REQ/DAV protocol,
// routing and data timers) on network input i and a destination port
// (parity and address check, GRANT/DRCV return) on network output i.
//
// Normal use: each PE drives its source port through pe_cmd_* (setup with a
// routing-tag word, send data words, release the path; see source_port) and
// sees received words on rx_*. When a PE's setup or transfer ends in a block
// or an error while auto_diag is set, or when diag_start is pulsed, the
// diagnostic controller takes over every source port and runs the two-phase
// test: all boxes straight (phase 1), then all boxes exchange (phase 2), each
// with a setup and up to two data words; PE commands are ignored meanwhile.
// The fault locator then classifies the outcome into groups 1..5 and reports
// the faulty box, link, box pair, or path (see fault_locator). trig_src and
// trig_dest record the request that started an automatic diagnosis. When
// such a diagnosis ends in group 5 (no anomaly: a grant line stuck
// asserted), the grant search starts by itself on that request and reports
// the stuck link on search_* (see grant_search); after a manual diagnosis
// there is no failed request to search along, and need_search is left for
// the host.
//
// Fault injection inputs model the single faults the procedure is designed
// to find (one stuck line on one link, one box in a wrong state); tie them
// off in normal use.
//
// Result outputs are valid while diag_done is high.
module dcn_fault_top
  import dcn_pkg::*;
#(
  parameter int unsigned N        = N_PE,
  parameter int unsigned LOGN     = $clog2(N),
  parameter int unsigned T_ROUTE  = 64,
  parameter int unsigned T_DATA   = 64,
  parameter int unsigned T_SETTLE = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // PE side of the source ports
  input  logic [N-1:0]      pe_cmd_valid,
  input  logic [1:0]        pe_cmd_op   [N],
  input  logic [M_BITS-1:0] pe_cmd_word [N],
  output logic [N-1:0]      pe_done,
  output res_t              pe_res      [N],
  output logic [N-1:0]      pe_illegal,
  // PE side of the destination ports
  output logic [N-1:0]      rx_valid,
  output logic [M_BITS-1:0] rx_word     [N],
  output logic [N-1:0]      rx_is_tag,
  output logic [N-1:0]      rx_par_ok,
  output logic [N-1:0]      rx_addr_ok,
  // diagnosis
  input  logic              diag_start,
  input  logic              auto_diag,
  output logic              diag_busy,
  output logic              diag_done,
  output logic [LOGN-1:0]   trig_src,
  output logic [LOGN-1:0]   trig_dest,
  output logic [2:0]        flt_group,
  output logic [3:0]        flt_subgroup,
  output loc_kind_t         flt_kind,
  output logic [$clog2(LOGN+1)-1:0] flt_level,
  output logic [LOGN-1:0]   flt_label,
  output logic [LOGN-1:0]   flt_path_src,
  output logic              flt_retested,
  output logic              need_search,
  // grant-line search, run after an automatic diagnosis that found group 5
  output logic              search_busy,
  output logic              search_done,
  output logic [$clog2(LOGN+1)-1:0] search_level,
  output logic [LOGN-1:0]   search_label,
  output logic [2:0]        search_trials,
  output phase_rec_t        rec_main    [2][N],
  // fault injection
  input  logic              lnk_flt_en,
  input  logic [$clog2(LOGN+1)-1:0] lnk_flt_level,
  input  logic [LOGN-1:0]   lnk_flt_label,
  input  logic [$clog2(N_SIG)-1:0] lnk_flt_sig,
  input  logic              lnk_flt_val,
  input  logic              box_flt_en,
  input  logic [$clog2(LOGN)-1:0] box_flt_stage,
  input  logic [LOGN-1:0]   box_flt_label,
  input  logic [3:0]        box_flt_s10,
  input  logic [3:0]        box_flt_s5,
  input  logic              ow_val,
  output logic [3:0]        box_state   [LOGN*N/2]
);

  fwd_t src_fwd [N];
  bwd_t src_bwd [N];
  fwd_t dst_fwd [N];
  bwd_t dst_bwd [N];

  // diagnostic controller side
  logic              d_phase;
  logic [1:0]        d_sel;
  logic [N-1:0]      d_cmd_valid;
  logic [1:0]        d_cmd_op;
  phase_rec_t        rec_re [2][N];
  logic              retest_valid, need_retest;
  logic [N-1:0]      port_done, port_illegal;
  res_t              port_res [N];
  logic [M_BITS-1:0] tp_word [N];

  // grant search side
  logic [N-1:0]      g_cmd_valid;
  logic [1:0]        g_cmd_op;
  logic [M_BITS-1:0] g_cmd_word;
  logic              trig_valid, diag_done_q, search_start;

  // last command word of each PE, to know the destination of a failed request
  logic [LOGN-1:0]   last_tag [N];
  logic              auto_start;

  for (genvar s = 0; s < N; s++) begin : g_pe
    logic              cv;
    logic [1:0]        op;
    logic [M_BITS-1:0] w;
    logic [P_BITS-1:0] tp_par;

    test_pattern_gen #(.LOGN(LOGN)) u_tp (
      .addr  (LOGN'(s)),
      .phase (d_phase),
      .sel   (d_sel),
      .word  (tp_word[s]),
      .par   (tp_par)
    );

    always_comb begin
      if (search_busy) begin
        cv = g_cmd_valid[s];
        op = g_cmd_op;
        w  = g_cmd_word;
      end else if (diag_busy) begin
        cv = d_cmd_valid[s];
        op = d_cmd_op;
        w  = tp_word[s];
      end else begin
        cv = pe_cmd_valid[s];
        op = pe_cmd_op[s];
        w  = pe_cmd_word[s];
      end
    end

    source_port #(.T_ROUTE(T_ROUTE), .T_DATA(T_DATA)) u_src (
      .clk       (clk),
      .rst_n     (rst_n),
      .cmd_valid (cv),
      .cmd_op    (op),
      .cmd_word  (w),
      .busy      (),
      .done      (port_done[s]),
      .res       (port_res[s]),
      .illegal   (port_illegal[s]),
      .net_fwd   (src_fwd[s]),
      .net_bwd   (src_bwd[s])
    );

    dest_port #(.LOGN(LOGN)) u_dst (
      .clk        (clk),
      .rst_n      (rst_n),
      .my_addr    (LOGN'(s)),
      .net_fwd    (dst_fwd[s]),
      .net_bwd    (dst_bwd[s]),
      .rx_valid   (rx_valid[s]),
      .rx_word    (rx_word[s]),
      .rx_is_tag  (rx_is_tag[s]),
      .rx_par_ok  (rx_par_ok[s]),
      .rx_addr_ok (rx_addr_ok[s])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) last_tag[s] <= '0;
      else if (!diag_busy && !search_busy && pe_cmd_valid[s] && pe_cmd_op[s] == 2'd1)
        last_tag[s] <= pe_cmd_word[s][LOGN-1:0];
    end

    // the parity travels with the word inside the source port; the generator's
    // copy is a reference for checking, compared here for consistency
    a_par: assert property (@(posedge clk) disable iff (!rst_n)
      tp_par == byte_parity(tp_word[s]));
  end

  // Normal-mode results go to the PEs; diagnostic results stay internal.
  always_comb begin
    for (int s = 0; s < N; s++) pe_res[s] = port_res[s];
    pe_done    = (diag_busy || search_busy) ? '0 : port_done;
    pe_illegal = port_illegal;
  end

  // Automatic start: the first normal-mode failure while auto_diag is set.
  always_comb begin
    auto_start = 1'b0;
    for (int s = 0; s < N; s++)
      if (auto_diag && !diag_busy && !search_busy && port_done[s] &&
          (port_res[s] == RES_ERR || port_res[s] == RES_BLK)) auto_start = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_valid  <= 1'b0;
      diag_done_q <= 1'b0;
    end else begin
      diag_done_q <= diag_done;
      if (auto_start)      trig_valid <= 1'b1;
      else if (diag_start) trig_valid <= 1'b0;
    end
  end

  // the search starts when a diagnosis with a known triggering request ends in group 5
  assign search_start = diag_done && !diag_done_q && need_search && trig_valid;

  grant_search #(.N(N), .LOGN(LOGN), .T_SETTLE(T_SETTLE)) u_gs (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (search_start),
    .src         (trig_src),
    .dest        (trig_dest),
    .cmd_valid   (g_cmd_valid),
    .cmd_op      (g_cmd_op),
    .cmd_word    (g_cmd_word),
    .port_done   (port_done),
    .port_res    (port_res),
    .busy        (search_busy),
    .done_flag   (search_done),
    .found_level (search_level),
    .found_label (search_label),
    .trials      (search_trials)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_src  <= '0;
      trig_dest <= '0;
    end else if (auto_start) begin
      for (int s = N - 1; s >= 0; s--)
        if (port_done[s] && (port_res[s] == RES_ERR || port_res[s] == RES_BLK)) begin
          trig_src  <= LOGN'(s);
          trig_dest <= last_tag[s];
        end
    end
  end

  diag_controller #(.N(N), .T_SETTLE(T_SETTLE)) u_ctl (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (diag_start || auto_start),
    .need_retest  (need_retest),
    .phase        (d_phase),
    .sel          (d_sel),
    .cmd_valid    (d_cmd_valid),
    .cmd_op       (d_cmd_op),
    .port_done    (port_done),
    .port_res     (port_res),
    .port_illegal (port_illegal),
    .rec_main     (rec_main),
    .rec_re       (rec_re),
    .retest_valid (retest_valid),
    .busy         (diag_busy),
    .finished     (diag_done)
  );

  fault_locator #(.N(N), .LOGN(LOGN)) u_loc (
    .rec_main     (rec_main),
    .rec_re       (rec_re),
    .retest_valid (retest_valid),
    .group        (flt_group),
    .subgroup     (flt_subgroup),
    .loc_kind     (flt_kind),
    .loc_level    (flt_level),
    .loc_label    (flt_label),
    .path_src     (flt_path_src),
    .need_retest  (need_retest),
    .need_search  (need_search)
  );

  assign flt_retested = retest_valid;

  cube_network #(.N(N), .LOGN(LOGN)) u_net (
    .clk           (clk),
    .rst_n         (rst_n),
    .src_fwd       (src_fwd),
    .src_bwd       (src_bwd),
    .dst_fwd       (dst_fwd),
    .dst_bwd       (dst_bwd),
    .lnk_flt_en    (lnk_flt_en),
    .lnk_flt_level (lnk_flt_level),
    .lnk_flt_label (lnk_flt_label),
    .lnk_flt_sig   (lnk_flt_sig),
    .lnk_flt_val   (lnk_flt_val),
    .box_flt_en    (box_flt_en),
    .box_flt_stage (box_flt_stage),
    .box_flt_label (box_flt_label),
    .box_flt_s10   (box_flt_s10),
    .box_flt_s5    (box_flt_s5),
    .ow_val        (ow_val),
    .box_state     (box_state)
  );

endmodule
