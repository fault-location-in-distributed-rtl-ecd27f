// Checks the test words: the worked example for PE 6 in both phases, and for
// every PE and phase the rules (tag = address or its complement in bits 3..0,
// zeros above; word 1 = ~tag; word 2 = word 1 with bits 0 and 8 flipped;
// the parity of word 2 differs from that of word 1 on both bytes; every
// data and parity line sees both 0 and 1 over the three words).
module tb_test_pattern_gen;
  import dcn_pkg::*;

  logic [3:0]  addr;
  logic        phase;
  logic [1:0]  sel;
  logic [15:0] word;
  logic [1:0]  par;

  test_pattern_gen dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic get(input int a, input bit p, input int s, output logic [15:0] w, output logic [1:0] pp);
    addr = 4'(a); phase = p; sel = 2'(s);
    #1;
    w = word; pp = par;
  endtask

  initial begin
    logic [15:0] w0, w1, w2;
    logic [1:0]  p0, p1, p2;
    // worked example, PE 6
    get(6, 0, 0, w0, p0); get(6, 0, 1, w1, p1); get(6, 0, 2, w2, p2);
    check(w0 == 16'h0006 && p0 == 2'b00, "PE 6 phase 1 tag");
    check(w1 == 16'hFFF9 && p1 == 2'b00, "PE 6 phase 1 word 1");
    check(w2 == 16'hFEF8 && p2 == 2'b11, "PE 6 phase 1 word 2");
    get(6, 1, 0, w0, p0); get(6, 1, 1, w1, p1); get(6, 1, 2, w2, p2);
    check(w0 == 16'h0009 && p0 == 2'b00, "PE 6 phase 2 tag");
    check(w1 == 16'hFFF6 && p1 == 2'b00, "PE 6 phase 2 word 1");
    check(w2 == 16'hFEF7 && p2 == 2'b11, "PE 6 phase 2 word 2");
    for (int a = 0; a < 16; a++)
      for (int p = 0; p < 2; p++) begin
        logic [17:0] seen0, seen1, v0, v1, v2;
        logic [3:0] a4;
        get(a, p[0], 0, w0, p0); get(a, p[0], 1, w1, p1); get(a, p[0], 2, w2, p2);
        a4 = 4'(a);
        if (p == 1) a4 = ~a4;
        check(w0 == {12'h000, a4}, "tag rule");
        check(w1 == ~w0 && w2 == (w1 ^ 16'h0101), "data word rule");
        check(p0 == {^w0[15:8], ^w0[7:0]} && p1 == {^w1[15:8], ^w1[7:0]} &&
              p2 == {^w2[15:8], ^w2[7:0]}, "even parity per byte");
        check(p2 == ~p1, "second word flips both parity bits");
        v0 = {p0, w0}; v1 = {p1, w1}; v2 = {p2, w2};
        seen1 = v0 | v1 | v2;
        seen0 = ~v0 | ~v1 | ~v2;
        check(&seen1 && &seen0, "every line sees 0 and 1");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
