// Test of the grant search against an abstract network model. For a
// stuck-asserted grant line on link level k of the searched path, a request
// blocked at stage i sees a grant exactly when k > i. The model finds the
// blocking stage from the blocker's address (it differs from the source in
// bit i only), answers the blocker's setup with OK and the searched request
// with ERR (grant, no data received) or BLK. Checked for every level k and
// several paths: the found level and link label, the number of trials of a binary search, the
// blocker choice, and that every trial releases both PEs.
module tb_grant_search;
  import dcn_pkg::*;

  localparam int N = 16;
  localparam logic [1:0] OP_SETUP = 2'd1, OP_RELEASE = 2'd3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, busy, done_flag;
  logic [3:0]  src, dest, found_label;
  logic [2:0]  found_level, trials;
  logic [N-1:0] cmd_valid, port_done;
  logic [1:0]  cmd_op;
  logic [15:0] cmd_word;
  res_t        port_res [N];

  grant_search #(.N(N), .T_SETTLE(3)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // trials of a binary search for k in 0..4 that probes mid = ceil((lo+hi)/2)
  function automatic int exp_trials(input int k);
    int lo = 0, hi = 4, n = 0;
    while (lo < hi) begin
      int mid = (lo + hi + 1) / 2;
      if (k >= mid) lo = mid; else hi = mid - 1;
      n++;
    end
    return n;
  endfunction

  int k_fault;
  int blk_stage;
  int n_rel, bad_blocker, bad_tag;
  always @(posedge clk) begin
    port_done <= '0;
    for (int s = 0; s < N; s++) begin
      if (cmd_valid[s] && rst_n) begin
        port_done[s] <= 1'b1;
        if (cmd_op == OP_RELEASE) begin
          port_res[s] <= RES_OK;
          n_rel += 1;
        end else if (s == int'(src)) begin
          port_res[s] <= (k_fault > blk_stage) ? RES_ERR : RES_BLK;
        end else begin
          int x, cnt;
          x = s ^ int'(src);
          cnt = 0;
          for (int b = 0; b < 4; b++) if (x[b]) begin cnt++; blk_stage <= b; end
          if (cnt != 1) bad_blocker <= bad_blocker + 1;
          port_res[s] <= RES_OK;
        end
        if (cmd_op == OP_SETUP && cmd_word != {12'h000, dest}) begin
          bad_tag <= bad_tag + 1;
        end
      end
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pairs [3][2] = '{'{0, 4}, '{6, 9}, '{15, 3}};
    start = 0; src = 0; dest = 0; k_fault = 0; blk_stage = 0;
    n_rel = 0; bad_blocker = 0; bad_tag = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++)
      for (int k = 0; k <= 4; k++) begin
        int guard = 0;
        logic [3:0] exp_lab, sv, dv, hm;
        src = 4'(pairs[p][0]); dest = 4'(pairs[p][1]); k_fault = k;
        n_rel = 0;
        @(negedge clk); start = 1;
        @(negedge clk); start = 0;
        while (!done_flag && guard < 2000) begin @(negedge clk); guard++; end
        sv = src; dv = dest;
        hm = 4'((16 - (1 << k)) & 15);    // bits k..3
        exp_lab = (dv & hm) | (sv & ~hm);
        check(done_flag, "search finished");
        check(32'(found_level) == k, $sformatf("path %0d->%0d k=%0d: found level %0d", src, dest, k, found_level));
        check(found_label == exp_lab, $sformatf("path %0d->%0d k=%0d: label %0d expected %0d", src, dest, k, found_label, exp_lab));
        check(trials == 3'(exp_trials(k)), $sformatf("k=%0d: %0d trials", k, trials));
        check(n_rel == 2 * int'(trials), "each trial releases blocker and source");
      end
    check(bad_blocker == 0, "blocker differs from the source in one bit");
    check(bad_tag == 0, "every setup carries the destination tag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
