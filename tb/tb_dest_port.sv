// Test of the destination port: grant follows REQ one cycle later; the tag
// is accepted only with correct parity and matching address; data words
// need only correct parity; DRCV rises one cycle after an accepted DAV edge
// and falls with DAV; a held-high DAV gates in nothing more; a new request
// starts again with a tag.
module tb_dest_port;
  import dcn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  my_addr;
  fwd_t        net_fwd;
  bwd_t        net_bwd;
  logic        rx_valid, rx_is_tag, rx_par_ok, rx_addr_ok;
  logic [15:0] rx_word;

  dest_port dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  int nrx = 0;
  always @(posedge clk) if (rx_valid) nrx <= nrx + 1;

  // present a word with DAV rising; report whether DRCV came up
  task automatic word(input logic [15:0] w, input logic [1:0] par_flip, output bit acc);
    @(negedge clk);
    net_fwd.data = w; net_fwd.par = byte_parity(w) ^ par_flip; net_fwd.dav = 1;
    @(negedge clk);
    acc = net_bwd.drcv;
    @(negedge clk);
    net_fwd.dav = 0;
    @(negedge clk);
    check(!net_bwd.drcv, "DRCV falls with DAV");
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit a;
    int n0;
    my_addr = 4'd11;
    net_fwd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!net_bwd.grant && !net_bwd.drcv, "idle");
    net_fwd.req = 1;
    @(negedge clk);
    check(net_bwd.grant, "grant one cycle after REQ");
    word(16'h000B, 2'b00, a);
    check(a, "correct tag accepted");
    word(16'hFFF4, 2'b00, a);
    check(a, "data word accepted");
    word(16'hFEF5, 2'b01, a);
    check(!a, "data word with parity error rejected");
    word(16'h000B, 2'b00, a);
    check(a, "later word needs no address match");
    // new request: wrong address rejected
    net_fwd.req = 0;
    @(negedge clk); @(negedge clk);
    check(!net_bwd.grant, "grant drops with REQ");
    net_fwd.req = 1;
    word(16'h000A, 2'b00, a);
    check(!a && rx_is_tag == 1'b1 && !rx_addr_ok, "wrong address rejected");
    word(16'hFFF5, 2'b00, a);
    check(a, "data after rejected tag checked for parity only");
    net_fwd.req = 0;
    @(negedge clk); @(negedge clk);
    net_fwd.req = 1;
    word(16'h100B, 2'b10, a);
    check(!a, "tag with parity error rejected");
    // DAV held high: one gate-in only
    n0 = nrx;
    @(negedge clk);
    net_fwd.data = 16'h1111; net_fwd.par = byte_parity(16'h1111); net_fwd.dav = 1;
    repeat (5) @(negedge clk);
    net_fwd.data = 16'h2222;
    repeat (3) @(negedge clk);
    check(nrx == n0 + 1 && rx_word == 16'h1111, "only the DAV edge gates a word in");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
