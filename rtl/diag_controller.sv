// Sequencer of the two-phase fault-location test over all PEs.
//
// On `start` it first drops every path (REQ lowered at all sources, which
// also aborts whatever the ports were doing), then runs phase 1 (every PE sends its own address as routing tag,
// setting all boxes straight) and then phase 2 (every PE sends the complement
// of its address, setting all boxes to exchange). Each phase is a setup
// subphase and a data transfer subphase of up to two words, issued to all
// source ports at once:
//   setup   -> if any PE reports a block or an error, all paths are dropped
//              and the next phase begins;
//   word 1  -> (complement of the tag) if any PE reports an error, drop all
//              paths and go on;
//   word 2  -> (word 1 with bits 0 and 8 complemented), then drop all paths.
// Dropping paths means lowering REQ at every source, followed by T_SETTLE
// idle cycles so the boxes release before the next phase.
//
// If, after both phases, `need_retest` is high (the locator found errors in
// both setups that it cannot yet tell apart), both phases are run once more in
// retest mode: the data words are sent even after a faulty setup, by every
// PE whose request got a grant or an error rather than a block. Its outcomes
// go to rec_re and retest_valid is raised.
//
// Interface: word selection (phase, sel) goes to the per-PE pattern
// generators, whose words the top routes to the source ports together with
// cmd_valid/cmd_op; per-PE done/res/illegal come back from the ports.
// `finished` stays high from the end of the test until the next `start`.
// The command codes match source_port. Global lock-step of all PEs and the
// retest trigger are this design's choices.
module diag_controller
  import dcn_pkg::*;
#(
  parameter int unsigned N        = N_PE,
  parameter int unsigned T_SETTLE = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       need_retest,
  output logic       phase,          // 0: phase 1, 1: phase 2
  output logic [1:0] sel,            // word selection for the pattern generators
  output logic [N-1:0] cmd_valid,
  output logic [1:0] cmd_op,
  input  logic [N-1:0] port_done,
  input  res_t       port_res     [N],
  input  logic [N-1:0] port_illegal,
  output phase_rec_t rec_main     [2][N],
  output phase_rec_t rec_re       [2][N],
  output logic       retest_valid,
  output logic       busy,
  output logic       finished
);

  localparam logic [1:0] OP_SETUP = 2'd1, OP_SEND = 2'd2, OP_RELEASE = 2'd3;
  localparam logic [1:0] STEP_SETUP = 2'd0, STEP_W1 = 2'd1, STEP_W2 = 2'd2, STEP_REL = 2'd3;

  typedef enum logic [2:0] {C_IDLE, C_ISSUE, C_WAIT, C_SETTLE, C_FINISH} cst_t;
  cst_t          st;
  logic [1:0]    step;
  logic          retest;
  logic          pre;             // initial release before phase 1
  logic [N-1:0]  pending;
  logic [N-1:0]  mask;
  logic [$clog2(T_SETTLE+1)-1:0] cnt;
  logic          any_bad;

  assign busy     = (st != C_IDLE) && (st != C_FINISH);
  assign finished = (st == C_FINISH);
  assign sel      = (step == STEP_REL) ? 2'd0 : step;

  // PEs that take part in the current command.
  always_comb begin
    for (int s = 0; s < N; s++) begin
      if (retest && (step == STEP_W1 || step == STEP_W2))
        mask[s] = (rec_re[phase][s].setup != RES_BLK);
      else
        mask[s] = 1'b1;
    end
  end

  always_comb begin
    unique case (step)
      STEP_SETUP:      cmd_op = OP_SETUP;
      STEP_W1, STEP_W2: cmd_op = OP_SEND;
      default:         cmd_op = OP_RELEASE;
    endcase
    cmd_valid = (st == C_ISSUE) ? mask : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= C_IDLE;
      step         <= STEP_SETUP;
      phase        <= 1'b0;
      retest       <= 1'b0;
      pre          <= 1'b0;
      retest_valid <= 1'b0;
      pending      <= '0;
      cnt          <= '0;
      any_bad      <= 1'b0;
      for (int p = 0; p < 2; p++)
        for (int s = 0; s < N; s++) begin
          rec_main[p][s] <= '{RES_NONE, RES_NONE, 1'b0};
          rec_re[p][s]   <= '{RES_NONE, RES_NONE, 1'b0};
        end
    end else begin
      unique case (st)
        C_IDLE, C_FINISH: begin
          if (start) begin
            st           <= C_ISSUE;
            step         <= STEP_REL;
            pre          <= 1'b1;
            phase        <= 1'b0;
            retest       <= 1'b0;
            retest_valid <= 1'b0;
            for (int p = 0; p < 2; p++)
              for (int s = 0; s < N; s++) begin
                rec_main[p][s] <= '{RES_NONE, RES_NONE, 1'b0};
                rec_re[p][s]   <= '{RES_NONE, RES_NONE, 1'b0};
              end
          end
        end
        C_ISSUE: begin
          pending <= mask;
          any_bad <= 1'b0;
          st      <= C_WAIT;
        end
        C_WAIT: begin
          logic [N-1:0] pend;
          logic         bad;
          pend = pending;
          bad  = any_bad;
          for (int s = 0; s < N; s++) begin
            if (pending[s] && port_done[s]) begin
              pend[s] = 1'b0;
              if (step == STEP_SETUP) begin
                if (port_res[s] != RES_OK) bad = 1'b1;
                if (retest) begin
                  rec_re[phase][s].setup   <= port_res[s];
                  rec_re[phase][s].illegal <= port_illegal[s];
                end else begin
                  rec_main[phase][s].setup   <= port_res[s];
                  rec_main[phase][s].illegal <= port_illegal[s];
                end
              end else if (step != STEP_REL) begin
                if (port_res[s] != RES_OK) bad = 1'b1;
                // keep the first failing word's result
                if (retest) begin
                  if (rec_re[phase][s].data != RES_ERR) rec_re[phase][s].data <= port_res[s];
                end else begin
                  if (rec_main[phase][s].data != RES_ERR) rec_main[phase][s].data <= port_res[s];
                end
              end
            end
          end
          pending <= pend;
          any_bad <= bad;
          if (pend == '0) begin
            unique case (step)
              STEP_SETUP: begin
                step <= (bad && !retest) ? STEP_REL : STEP_W1;
                st   <= C_ISSUE;
              end
              STEP_W1: begin
                step <= (bad && !retest) ? STEP_REL : STEP_W2;
                st   <= C_ISSUE;
              end
              STEP_W2: begin
                step <= STEP_REL;
                st   <= C_ISSUE;
              end
              default: begin
                cnt <= '0;
                st  <= C_SETTLE;
              end
            endcase
          end
        end
        C_SETTLE: begin
          cnt <= cnt + 1'b1;
          if (cnt >= ($bits(cnt))'(T_SETTLE - 1)) begin
            step <= STEP_SETUP;
            pre  <= 1'b0;
            if (pre) begin
              st <= C_ISSUE;
            end else if (phase == 1'b0) begin
              phase <= 1'b1;
              st    <= C_ISSUE;
            end else if (!retest && need_retest) begin
              retest <= 1'b1;
              phase  <= 1'b0;
              st     <= C_ISSUE;
            end else begin
              retest_valid <= retest;
              st           <= C_FINISH;
            end
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
