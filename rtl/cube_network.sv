// Generalized cube network with distributed routing control.
//
// N = 2**n inputs and outputs, n stages of N/2 interchange boxes. Stage i
// (i = n-1 at the input down to 0 at the output) pairs the lines whose labels
// differ only in bit i; a line keeps its label through a box, so the box of
// stage i whose upper line has label L (bit i of L clear) takes links L and
// L|2**i of level i+1 and drives links L and L|2**i of level i. Level n links
// join the source ports to stage n-1, level 0 links join stage 0 to the
// destination ports. With destination-tag routing a message from source s to
// destination d uses, at level k, the link labelled {d[n-1:k], s[k-1:0]}.
//
// Fault injection (test use; tie off in normal use): at most one link, chosen
// by (lnk_flt_level, lnk_flt_label), gets a stuck line, and at most one box,
// chosen by (box_flt_stage, box_flt_label = label of its upper line), gets the
// wrong-state fault of interchange_box. ow_val is the overwrite value of every
// box. box_state reports the state each box applies, indexed
// [stage*N/2 + box number], where the box number is the upper label with bit
// i removed.
//
// Timing: each stage adds one clock to path set-up; an established path is
// combinational from source port to destination port and back.
module cube_network
  import dcn_pkg::*;
#(
  parameter int unsigned N = N_PE,
  parameter int unsigned LOGN = $clog2(N)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  fwd_t                      src_fwd [N],   // from source port s
  output bwd_t                      src_bwd [N],
  output fwd_t                      dst_fwd [N],   // to destination port d
  input  bwd_t                      dst_bwd [N],
  // single link stuck-at fault
  input  logic                      lnk_flt_en,
  input  logic [$clog2(LOGN+1)-1:0] lnk_flt_level,
  input  logic [LOGN-1:0]           lnk_flt_label,
  input  logic [$clog2(N_SIG)-1:0]  lnk_flt_sig,
  input  logic                      lnk_flt_val,
  // single interchange box fault
  input  logic                      box_flt_en,
  input  logic [$clog2(LOGN)-1:0]   box_flt_stage,
  input  logic [LOGN-1:0]           box_flt_label,
  input  logic [3:0]                box_flt_s10,
  input  logic [3:0]                box_flt_s5,
  input  logic                      ow_val,
  output logic [3:0]                box_state [LOGN*N/2]
);

  // Each link's ends are declared inside its own generate block, so that every
  // link is a separate signal: fa drives the link, fb leaves it; ba is the
  // return bundle entering it from the far side, bb the one leaving it.
  for (genvar k = 0; k <= LOGN; k++) begin : g_lvl
    for (genvar l = 0; l < N; l++) begin : g_lnk
      fwd_t fa, fb;
      bwd_t ba, bb;
      cube_link u_link (
        .fwd_in  (fa),
        .fwd_out (fb),
        .bwd_in  (ba),
        .bwd_out (bb),
        .flt_en  (lnk_flt_en && lnk_flt_level == k && 32'(lnk_flt_label) == l),
        .flt_sig (lnk_flt_sig),
        .flt_val (lnk_flt_val)
      );
    end
  end

  // Network inputs and outputs.
  for (genvar l = 0; l < N; l++) begin : g_io
    assign g_lvl[LOGN].g_lnk[l].fa = src_fwd[l];
    assign src_bwd[l]              = g_lvl[LOGN].g_lnk[l].bb;
    assign dst_fwd[l]              = g_lvl[0].g_lnk[l].fb;
    assign g_lvl[0].g_lnk[l].ba    = dst_bwd[l];
  end

  // Stages.
  for (genvar i = 0; i < LOGN; i++) begin : g_stg
    for (genvar b = 0; b < N/2; b++) begin : g_box
      // upper line label: box number b with a 0 inserted at bit i
      localparam int unsigned LO = ((b >> i) << (i + 1)) | (b & ((1 << i) - 1));
      localparam int unsigned HI = LO | (1 << i);
      fwd_t ib_fwd [2];
      bwd_t ib_bwd [2];
      fwd_t ob_fwd [2];
      bwd_t ob_bwd [2];
      assign ib_fwd[0] = g_lvl[i+1].g_lnk[LO].fb;
      assign ib_fwd[1] = g_lvl[i+1].g_lnk[HI].fb;
      assign g_lvl[i+1].g_lnk[LO].ba = ib_bwd[0];
      assign g_lvl[i+1].g_lnk[HI].ba = ib_bwd[1];
      assign g_lvl[i].g_lnk[LO].fa = ob_fwd[0];
      assign g_lvl[i].g_lnk[HI].fa = ob_fwd[1];
      assign ob_bwd[0] = g_lvl[i].g_lnk[LO].bb;
      assign ob_bwd[1] = g_lvl[i].g_lnk[HI].bb;
      interchange_box #(.STAGE(i)) u_box (
        .clk     (clk),
        .rst_n   (rst_n),
        .in_fwd  (ib_fwd),
        .in_bwd  (ib_bwd),
        .out_fwd (ob_fwd),
        .out_bwd (ob_bwd),
        .flt_en  (box_flt_en && box_flt_stage == i && 32'(box_flt_label) == LO),
        .flt_s10 (box_flt_s10),
        .flt_s5  (box_flt_s5),
        .ow_val  (ow_val),
        .state   (box_state[i*N/2 + b])
      );
    end
  end

endmodule
