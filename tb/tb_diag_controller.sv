// Test of the two-phase test sequencer against scripted source ports. Each
// port answers a command two cycles later with a result picked by the
// scenario. The testbench logs every command the controller issues
// (operation, phase, word selection, PE mask) and compares the log with the
// expected order, and checks the recorded outcomes:
//   A  no fault: release, then setup / word 1 / word 2 / release per phase
//   B  setup error in phase 1: data transfer of phase 1 skipped
//   C  error on word 1 in phase 2: word 2 of phase 2 skipped
//   D  retest requested: both phases again with data sent despite setup
//      errors, except by the blocked PE; illegal flag recorded
module tb_diag_controller;
  import dcn_pkg::*;

  localparam int N = 16;
  localparam logic [1:0] OP_SETUP = 2'd1, OP_SEND = 2'd2, OP_RELEASE = 2'd3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start, need_retest, phase, retest_valid, busy, finished;
  logic [1:0]   sel, cmd_op;
  logic [N-1:0] cmd_valid, port_done, port_illegal;
  res_t         port_res [N];
  phase_rec_t   rec_main [2][N];
  phase_rec_t   rec_re   [2][N];

  diag_controller #(.N(N), .T_SETTLE(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // scenario: (phase, sel) of a failing command, failing PE, result
  int   scen;
  int   run_cnt;   // number of SETUP commands seen for phase 0 (1 = main, 2 = retest)
  function automatic res_t answer(input logic [1:0] op, input logic ph, input logic [1:0] sl, input int s);
    if (op == OP_RELEASE) return RES_OK;
    case (scen)
      1: if (op == OP_SETUP && !ph && s == 3) return RES_ERR;
      2: if (op == OP_SEND && ph && sl == 2'd1 && s == 5) return RES_ERR;
      3: begin
           if (op == OP_SETUP && !ph && s == 2) return RES_BLK;
           if (op == OP_SETUP && !ph && s == 7) return RES_ERR;
         end
      default: ;
    endcase
    return RES_OK;
  endfunction

  // scripted ports, two-cycle latency
  logic [N-1:0] p1, p2;
  res_t         r1 [N], r2 [N];
  always_ff @(posedge clk) begin
    for (int s = 0; s < N; s++) begin
      p1[s] <= cmd_valid[s];
      r1[s] <= answer(cmd_op, phase, sel, s);
      p2[s] <= p1[s];
      r2[s] <= r1[s];
    end
  end
  always_comb begin
    port_done = p2;
    for (int s = 0; s < N; s++) begin
      port_res[s]     = r2[s];
      port_illegal[s] = (scen == 3 && s == 2 && r2[s] == RES_BLK);
    end
  end

  // command log: {op, phase, sel}
  logic [4:0]   log_e [$];
  logic [N-1:0] log_m [$];
  always @(posedge clk)
    if (cmd_valid != '0) begin
      log_e.push_back({cmd_op, phase, sel});
      log_m.push_back(cmd_valid);
    end

  function automatic logic [4:0] e(input logic [1:0] op, input int ph, input int sl);
    return {op, 1'(ph), 2'(sl)};
  endfunction

  task automatic run(input int sc, input logic rt);
    int guard = 0;
    scen = sc;
    need_retest = rt;
    log_e.delete();
    log_m.delete();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!finished && guard < 5000) begin @(negedge clk); guard++; end
    check(finished, $sformatf("scenario %0d finished", sc));
  endtask

  task automatic expect_log(input logic [4:0] exp [$], input string name);
    bit ok = (log_e.size() == exp.size());
    if (ok) foreach (exp[k]) if (log_e[k] != exp[k]) ok = 0;
    check(ok, $sformatf("%s: command order (%0d commands, expected %0d)", name, log_e.size(), exp.size()));
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; need_retest = 0; scen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // A
    run(0, 0);
    expect_log('{e(OP_RELEASE,0,0), e(OP_SETUP,0,0), e(OP_SEND,0,1), e(OP_SEND,0,2), e(OP_RELEASE,0,0),
                 e(OP_SETUP,1,0), e(OP_SEND,1,1), e(OP_SEND,1,2), e(OP_RELEASE,1,0)}, "A");
    begin
      bit ok = 1;
      for (int p = 0; p < 2; p++) for (int s = 0; s < N; s++)
        if (rec_main[p][s].setup != RES_OK || rec_main[p][s].data != RES_OK) ok = 0;
      check(ok && !retest_valid, "A: all outcomes OK, no retest");
      check(log_m[1] == '1, "A: every PE takes part");
    end

    // B
    run(1, 0);
    expect_log('{e(OP_RELEASE,0,0), e(OP_SETUP,0,0), e(OP_RELEASE,0,0),
                 e(OP_SETUP,1,0), e(OP_SEND,1,1), e(OP_SEND,1,2), e(OP_RELEASE,1,0)}, "B");
    check(rec_main[0][3].setup == RES_ERR && rec_main[0][4].setup == RES_OK, "B: setup error recorded");
    check(rec_main[0][4].data == RES_NONE && rec_main[1][4].data == RES_OK, "B: phase 1 data skipped");

    // C
    run(2, 0);
    expect_log('{e(OP_RELEASE,0,0), e(OP_SETUP,0,0), e(OP_SEND,0,1), e(OP_SEND,0,2), e(OP_RELEASE,0,0),
                 e(OP_SETUP,1,0), e(OP_SEND,1,1), e(OP_RELEASE,1,0)}, "C");
    check(rec_main[1][5].data == RES_ERR && rec_main[1][6].data == RES_OK, "C: data error recorded");

    // D
    run(3, 1);
    expect_log('{e(OP_RELEASE,0,0), e(OP_SETUP,0,0), e(OP_RELEASE,0,0),
                 e(OP_SETUP,1,0), e(OP_SEND,1,1), e(OP_SEND,1,2), e(OP_RELEASE,1,0),
                 e(OP_SETUP,0,0), e(OP_SEND,0,1), e(OP_SEND,0,2), e(OP_RELEASE,0,0),
                 e(OP_SETUP,1,0), e(OP_SEND,1,1), e(OP_SEND,1,2), e(OP_RELEASE,1,0)}, "D");
    check(retest_valid, "D: retest flagged");
    check(log_m.size() > 8 && log_m[8] == ~16'h0004, "D: blocked PE sends no data in the retest");
    check(rec_main[0][2].setup == RES_BLK && rec_main[0][2].illegal, "D: block and illegal recorded");
    check(rec_re[0][7].setup == RES_ERR && rec_re[0][7].data == RES_OK && rec_re[0][2].data == RES_NONE,
          "D: retest outcomes recorded");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
