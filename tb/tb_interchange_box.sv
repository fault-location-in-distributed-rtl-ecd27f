// Directed test of one interchange box (stage 1): straight and exchange
// set-up from tag bit 1, connection hold and release, conflict (upper input
// first, lower blocked until the output frees), return-path routing, and the
// fault model: broadcast state with AND of the returns, overwrite with both
// overwrite values, and a box that stays empty (S0).
module tb_interchange_box;
  import dcn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  fwd_t in_fwd [2];
  bwd_t in_bwd [2];
  fwd_t out_fwd [2];
  bwd_t out_bwd [2];
  logic flt_en, ow_val;
  logic [3:0] flt_s10, flt_s5, state;

  interchange_box #(.STAGE(1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic fwd_t msg(input logic [15:0] w, input logic req, input logic dav);
    fwd_t f;
    f.data = w; f.par = byte_parity(w); f.req = req; f.dav = dav;
    return f;
  endfunction

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_fwd[0] = '0; in_fwd[1] = '0; out_bwd[0] = '0; out_bwd[1] = '0;
    flt_en = 0; ow_val = 0; flt_s10 = 4'd10; flt_s5 = 4'd5;
    tick(2);
    rst_n = 1;
    tick();
    check(state == 4'd0 && out_fwd[0] == '0 && out_fwd[1] == '0, "idle: nothing connected");

    // straight: upper tag bit1 = 0, lower tag bit1 = 1
    in_fwd[0] = msg(16'h0001, 1, 1);
    in_fwd[1] = msg(16'h0006, 1, 1);
    #1;
    check(state == 4'd0, "connection waits for the clock edge");
    tick();
    check(state == 4'd10, "straight is S10");
    check(out_fwd[0] == in_fwd[0] && out_fwd[1] == in_fwd[1], "straight forward");
    out_bwd[0] = '{grant: 1, drcv: 0};
    out_bwd[1] = '{grant: 0, drcv: 1};
    #1;
    check(in_bwd[0] == out_bwd[0] && in_bwd[1] == out_bwd[1], "straight return");
    // data change passes combinationally while held
    in_fwd[0] = msg(16'hFFFE, 1, 0);
    #1;
    check(out_fwd[0].data == 16'hFFFE && out_fwd[0].dav == 1'b0, "held path passes data");
    // release
    in_fwd[0].req = 0; in_fwd[1].req = 0;
    tick();
    check(state == 4'd0 && out_fwd[0] == '0, "release");
    out_bwd[0] = '0; out_bwd[1] = '0;

    // exchange
    in_fwd[0] = msg(16'h0002, 1, 1);
    in_fwd[1] = msg(16'h0000, 1, 1);
    tick();
    check(state == 4'd5, "exchange is S5");
    check(out_fwd[1] == in_fwd[0] && out_fwd[0] == in_fwd[1], "exchange forward");
    out_bwd[1] = '{grant: 1, drcv: 1};
    #1;
    check(in_bwd[0] == 2'b11 && in_bwd[1] == 2'b00, "exchange return");
    in_fwd[0].req = 0; in_fwd[1].req = 0; out_bwd[1] = '0;
    tick();

    // conflict: both want the lower output; upper wins
    in_fwd[0] = msg(16'h0002, 1, 1);
    in_fwd[1] = msg(16'h0003, 1, 1);
    tick();
    check(state == 4'b0100, "conflict: only upper->lower (S4)");
    check(out_fwd[0] == '0 && out_fwd[1] == in_fwd[0], "conflict: lower input blocked");
    check(in_bwd[1] == '0, "conflict: blocked input sees no grant");
    tick(3);
    check(state == 4'b0100, "blocked input keeps waiting");
    in_fwd[0].req = 0;
    tick();
    check(state == 4'b0010, "upper released, waiting lower input takes the output on the same edge");
    in_fwd[1].req = 0;
    tick();

    // fault: broadcast S3 (lower input to both outputs) when straight is asked
    flt_en = 1; flt_s10 = 4'd3;
    in_fwd[0] = msg(16'h0000, 1, 1);
    in_fwd[1] = msg(16'h0002, 1, 1);
    tick();
    check(state == 4'd3, "fault S3 applied");
    check(out_fwd[0] == in_fwd[1] && out_fwd[1] == in_fwd[1], "S3: lower input broadcast");
    out_bwd[0] = '{grant: 1, drcv: 0};
    out_bwd[1] = '{grant: 1, drcv: 1};
    #1;
    check(in_bwd[1] == 2'b10 && in_bwd[0] == 2'b00, "S3: AND of returns, upper input cut off");
    in_fwd[0].req = 0; in_fwd[1].req = 0; out_bwd[0] = '0; out_bwd[1] = '0;
    tick();

    // fault: S7 when straight is asked, overwrite on the lower output
    flt_s10 = 4'd7; ow_val = 0;
    in_fwd[0] = msg(16'h00F0, 1, 1);
    in_fwd[1] = msg(16'h0F32, 1, 1);   // bit 1 set: lower
    tick();
    check(state == 4'd7, "fault S7 applied");
    check(out_fwd[0] == in_fwd[1], "S7: upper output from lower input");
    check(out_fwd[1].data == 16'h0030 && out_fwd[1].req == 1'b1, "S7: overwrite sticks at 0");
    ow_val = 1;
    #1;
    check(out_fwd[1].data == 16'h0FF2, "S7: overwrite sticks at 1");
    in_fwd[0].req = 0; in_fwd[1].req = 0;
    tick();

    // fault: S0 for exchange only; straight still fine
    flt_s10 = 4'd10; flt_s5 = 4'd0;
    in_fwd[0] = msg(16'h0002, 1, 1);
    in_fwd[1] = msg(16'h0000, 1, 1);
    tick();
    check(state == 4'd0 && out_fwd[0] == '0 && out_fwd[1] == '0, "fault S0 for exchange");
    in_fwd[0].req = 0; in_fwd[1].req = 0;
    tick();
    in_fwd[0] = msg(16'h0000, 1, 1);
    in_fwd[1] = msg(16'h0002, 1, 1);
    tick();
    check(state == 4'd10, "same box straight still correct");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
