// Test of the 16x16 generalized cube network with tag routing. The
// testbench drives REQ/DAV and routing tags at every input and acts as the
// destinations (GRANT = REQ, DRCV = DAV). For each of the 16 permutations
// d = s XOR c (all pass without conflict) it checks that every destination
// receives its source's word, that every source sees the return signals,
// that each stage i shows straight (S10) or exchange (S5) according to bit i
// of c, and that set-up takes one clock per stage. It then checks a stuck
// data line on one link and a box stuck empty.
module tb_cube_network;
  import dcn_pkg::*;

  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  fwd_t src_fwd [N];
  bwd_t src_bwd [N];
  fwd_t dst_fwd [N];
  bwd_t dst_bwd [N];
  logic       lnk_flt_en, lnk_flt_val, box_flt_en, ow_val;
  logic [2:0] lnk_flt_level;
  logic [3:0] lnk_flt_label, box_flt_label, box_flt_s10, box_flt_s5;
  logic [4:0] lnk_flt_sig;
  logic [1:0] box_flt_stage;
  logic [3:0] box_state [32];

  cube_network dut (.*);

  always_comb
    for (int d = 0; d < N; d++) begin
      dst_bwd[d].grant = dst_fwd[d].req;
      dst_bwd[d].drcv  = dst_fwd[d].dav;
    end

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] word_of(input int s, input int d);
    return {4'(s), 8'h5A, 4'(d)};
  endfunction

  task automatic drive(input int c);
    for (int s = 0; s < N; s++) begin
      src_fwd[s].data = word_of(s, s ^ c);
      src_fwd[s].par  = byte_parity(src_fwd[s].data);
      src_fwd[s].req  = 1;
      src_fwd[s].dav  = 1;
    end
  endtask

  task automatic release_all();
    for (int s = 0; s < N; s++) src_fwd[s] = '0;
    repeat (3) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lnk_flt_en = 0; lnk_flt_val = 0; lnk_flt_level = 0; lnk_flt_label = 0; lnk_flt_sig = 0;
    box_flt_en = 0; box_flt_stage = 0; box_flt_label = 0; box_flt_s10 = 10; box_flt_s5 = 5; ow_val = 0;
    for (int s = 0; s < N; s++) src_fwd[s] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    for (int c = 0; c < N; c++) begin
      bit ok_rx = 1, ok_ret = 1, ok_st = 1, early = 0;
      drive(c);
      // after 3 edges only stages 3..1 can be set: nothing reaches an output yet
      repeat (3) @(negedge clk);
      for (int d = 0; d < N; d++) if (dst_fwd[d].req) early = 1;
      check(!early, $sformatf("c=%0d: no output before 4 stage set-ups", c));
      @(negedge clk);
      for (int s = 0; s < N; s++) begin
        int d;
        d = s ^ c;
        if (dst_fwd[d].data !== word_of(s, d) || !dst_fwd[d].req || !dst_fwd[d].dav ||
            dst_fwd[d].par !== byte_parity(word_of(s, d))) ok_rx = 0;
        if (!src_bwd[s].grant || !src_bwd[s].drcv) ok_ret = 0;
      end
      for (int i = 0; i < 4; i++)
        for (int b = 0; b < 8; b++)
          if (box_state[i*8 + b] != (((c >> i) & 1) ? 4'd5 : 4'd10)) ok_st = 0;
      check(ok_rx, $sformatf("c=%0d: every destination gets its word", c));
      check(ok_ret, $sformatf("c=%0d: returns reach every source", c));
      check(ok_st, $sformatf("c=%0d: box states", c));
      release_all();
    end

    // stuck data line: level 2, label 5, bit 12 stuck at 1 (identity: PE 5 only)
    lnk_flt_en = 1; lnk_flt_level = 2; lnk_flt_label = 5; lnk_flt_sig = 12; lnk_flt_val = 1;
    drive(0);
    repeat (5) @(negedge clk);
    check(dst_fwd[5].data == (word_of(5, 5) | 16'h1000), "stuck line seen at destination 5");
    check(dst_fwd[4].data == word_of(4, 4), "other paths unaffected");
    release_all();
    lnk_flt_en = 0;

    // box stage 3 lines 0/8 stays empty when straight is requested
    box_flt_en = 1; box_flt_stage = 3; box_flt_label = 0; box_flt_s10 = 4'd0;
    drive(0);
    repeat (5) @(negedge clk);
    check(!dst_fwd[0].req && !dst_fwd[8].req, "empty box passes nothing");
    check(!src_bwd[0].grant && !src_bwd[8].grant, "no grant through empty box");
    check(dst_fwd[1].req && src_bwd[1].grant, "other boxes work");
    release_all();
    box_flt_en = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
