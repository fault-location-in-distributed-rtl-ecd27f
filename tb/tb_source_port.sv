// Test of the source port against a scripted network side. Covers: setup
// success, block (no grant: reported exactly T_ROUTE cycles after the
// command), routing error (grant without data received, T_DATA cycles),
// data received without grant (illegal), data words accepted and timed out,
// DRCV stuck high (no edge, error), release (also aborting a setup), the
// parity bits on the lines, and ignored out-of-state commands.
module tb_source_port;
  import dcn_pkg::*;

  localparam int TR = 20, TD = 12;
  localparam logic [1:0] OP_SETUP = 2'd1, OP_SEND = 2'd2, OP_RELEASE = 2'd3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cmd_valid;
  logic [1:0]  cmd_op;
  logic [15:0] cmd_word;
  logic        busy, done, illegal;
  res_t        res;
  fwd_t        net_fwd;
  bwd_t        net_bwd;

  source_port #(.T_ROUTE(TR), .T_DATA(TD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // scripted network: grant after g_dly cycles of REQ (if g_en), DRCV rises
  // d_dly cycles after each DAV rise (if d_en) and falls with DAV; d_stuck
  // holds DRCV high.
  logic g_en, d_en, d_stuck;
  int   g_dly, d_dly, req_cnt, dav_cnt;
  always_ff @(posedge clk) begin
    req_cnt <= net_fwd.req ? req_cnt + 1 : 0;
    dav_cnt <= net_fwd.dav ? dav_cnt + 1 : 0;
  end
  always_comb begin
    net_bwd.grant = g_en && net_fwd.req && req_cnt >= g_dly;
    net_bwd.drcv  = d_stuck || (d_en && net_fwd.dav && dav_cnt >= d_dly);
  end

  // issue a command, return the result and the cycles until done
  task automatic cmd(input logic [1:0] op, input logic [15:0] w, output res_t r, output int cyc);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_word = w;
    @(negedge clk);
    cmd_valid = 0;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    r = res;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    res_t r;
    int c;
    cmd_valid = 0; cmd_op = 0; cmd_word = 0;
    g_en = 1; d_en = 1; d_stuck = 0; g_dly = 3; d_dly = 2;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // successful setup
    cmd(OP_SETUP, 16'h0106, r, c);
    check(r == RES_OK && !illegal, "setup OK");
    check(net_fwd.req && !net_fwd.dav, "path held with DAV low after setup");
    check(net_fwd.data == 16'h0106 && net_fwd.par == 2'b10, "tag word and parity on the lines");
    // data words
    cmd(OP_SEND, 16'hFEF9, r, c);
    check(r == RES_OK, "word accepted");
    check(net_fwd.par == 2'b10, "data word parity");
    d_en = 0;
    cmd(OP_SEND, 16'h1234, r, c);
    check(r == RES_ERR, "word without data received is an error");
    check(c >= TD && c <= TD + 3, $sformatf("data timer length %0d", c));
    d_en = 1;
    cmd(OP_RELEASE, 0, r, c);
    check(!net_fwd.req && !net_fwd.dav, "release drops REQ and DAV");
    // out-of-state command: SEND with no path is ignored
    @(negedge clk); cmd_valid = 1; cmd_op = OP_SEND; cmd_word = 16'hAAAA;
    @(negedge clk); cmd_valid = 0;
    repeat (3) @(negedge clk);
    check(!busy && !net_fwd.dav, "SEND without a path ignored");

    // block: no grant
    g_en = 0; d_en = 0;
    cmd(OP_SETUP, 16'h0003, r, c);
    check(r == RES_BLK && !illegal, "block reported");
    check(c >= TR && c <= TR + 3, $sformatf("routing timer length %0d", c));
    cmd(OP_RELEASE, 0, r, c);

    // routing error: grant, no data received
    g_en = 1; d_en = 0;
    cmd(OP_SETUP, 16'h0003, r, c);
    check(r == RES_ERR, "routing error reported");
    cmd(OP_RELEASE, 0, r, c);

    // data received without grant
    g_en = 0; d_en = 1;
    cmd(OP_SETUP, 16'h0003, r, c);
    check(r == RES_BLK && illegal, "illegal combination flagged");
    cmd(OP_RELEASE, 0, r, c);

    // DRCV stuck high: setup sees no edge
    g_en = 1; d_en = 0; d_stuck = 1;
    cmd(OP_SETUP, 16'h0003, r, c);
    check(r == RES_ERR, "DRCV stuck high: no edge, error");
    cmd(OP_RELEASE, 0, r, c);
    d_stuck = 0; d_en = 1;

    // release aborts a setup in progress
    g_en = 0;
    @(negedge clk); cmd_valid = 1; cmd_op = OP_SETUP; cmd_word = 16'h0001;
    @(negedge clk); cmd_valid = 1; cmd_op = OP_RELEASE;
    @(negedge clk); cmd_valid = 0;
    check(!busy && !net_fwd.req, "release aborts setup");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
