// Random test of one link: without a fault every line passes unchanged; with
// a fault exactly the selected line is held at the stuck value. The expected
// bundle is rebuilt field by field from the line numbering.
module tb_cube_link;
  import dcn_pkg::*;

  fwd_t fwd_in, fwd_out;
  bwd_t bwd_in, bwd_out;
  logic flt_en, flt_val;
  logic [4:0] flt_sig;

  cube_link dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int it = 0; it < 2000; it++) begin
      fwd_t ef;
      bwd_t eb;
      fwd_in  = fwd_t'($urandom);
      bwd_in  = bwd_t'($urandom);
      flt_en  = ($urandom % 3) != 0;
      flt_sig = 5'($urandom % N_SIG);
      flt_val = 1'($urandom);
      #1;
      ef = fwd_in;
      eb = bwd_in;
      if (flt_en) begin
        if (flt_sig < 16)       ef.data[flt_sig] = flt_val;
        else if (flt_sig < 18)  ef.par[flt_sig - 16] = flt_val;
        else if (flt_sig == 18) ef.req = flt_val;
        else if (flt_sig == 19) ef.dav = flt_val;
        else if (flt_sig == 20) eb.grant = flt_val;
        else                    eb.drcv = flt_val;
      end
      checks++;
      if (fwd_out !== ef || bwd_out !== eb) begin
        failures++;
        if (failures < 5) $display("FAIL: sig %0d en %0d val %0d: got %h/%b expected %h/%b",
                                   flt_sig, flt_en, flt_val, fwd_out, bwd_out, ef, eb);
      end
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
