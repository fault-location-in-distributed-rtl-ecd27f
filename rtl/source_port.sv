// Source PE to network interface port.
//
// Drives one network input: the 16-bit word with its two even-parity bits
// (bit 1 over bits 15..8, bit 0 over bits 7..0), message request REQ and data
// available DAV, and watches the returning message grant GRANT and data
// received DRCV. A routing timer and a data timer turn missing return signals
// into a block or an error report.
//
// Commands (one-cycle cmd_valid pulse, op in cmd_op, word in cmd_word):
//   OP_SETUP   put the routing-tag word on the data lines and raise REQ and
//              DAV together. Done when GRANT and a rising edge of DRCV have
//              both been seen (RES_OK), or when the timers run out: no GRANT
//              within T_ROUTE cycles gives RES_BLK, GRANT but no DRCV edge
//              within T_DATA cycles gives RES_ERR. DRCV without GRANT sets
//              `illegal`. DAV is lowered afterwards and REQ is kept high, so
//              the path stays held (or keeps waiting) until OP_RELEASE.
//   OP_SEND    data transfer of one word over the held path: lower DAV, wait
//              for DRCV to fall (at most T_DATA cycles), present the word,
//              raise DAV and wait up to T_DATA cycles for a rising edge of
//              DRCV: RES_OK, otherwise RES_ERR. DAV is lowered afterwards.
//   OP_RELEASE drop REQ and DAV (the path is torn down box by box); accepted
//              in any state, aborting a command still in progress.
// `done` pulses for one cycle with `res` valid when a command has finished.
// Other commands arriving while busy, or not fitting the state (SEND with no
// path held, SETUP while a path is held), are ignored.
//
// DAV and DRCV are edge sensitive, as the fault analysis assumes. The single
// timeout per timer, its length and the command interface are this design's
// choices.
module source_port
  import dcn_pkg::*;
#(
  parameter int unsigned T_ROUTE = 64,   // routing timer, clock cycles
  parameter int unsigned T_DATA  = 64    // data timer, clock cycles
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  logic [1:0]        cmd_op,
  input  logic [M_BITS-1:0] cmd_word,
  output logic              busy,
  output logic              done,
  output res_t              res,
  output logic              illegal,
  output fwd_t              net_fwd,
  input  bwd_t              net_bwd
);

  localparam logic [1:0] OP_SETUP = 2'd1, OP_SEND = 2'd2, OP_RELEASE = 2'd3;
  localparam int unsigned TW = $clog2((T_ROUTE > T_DATA ? T_ROUTE : T_DATA) + 2);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_HOLD, S_DROP, S_SEND} st_t;
  st_t st;

  logic [M_BITS-1:0] word_q;
  logic              req_q, dav_q;
  logic [TW-1:0]     tmr;
  logic              got_grant, got_drcv;
  logic              drcv_prev;
  logic              drcv_rise;

  assign drcv_rise = net_bwd.drcv && !drcv_prev;
  assign busy      = (st == S_SETUP) || (st == S_DROP) || (st == S_SEND);

  assign net_fwd.data = word_q;
  assign net_fwd.par  = byte_parity(word_q);
  assign net_fwd.req  = req_q;
  assign net_fwd.dav  = dav_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      word_q    <= '0;
      req_q     <= 1'b0;
      dav_q     <= 1'b0;
      tmr       <= '0;
      got_grant <= 1'b0;
      got_drcv  <= 1'b0;
      drcv_prev <= 1'b0;
      done      <= 1'b0;
      res       <= RES_NONE;
      illegal   <= 1'b0;
    end else begin
      drcv_prev <= net_bwd.drcv;
      done      <= 1'b0;
      unique case (st)
        S_IDLE, S_HOLD: begin
          if (cmd_valid) begin
            tmr <= '0;
            if (cmd_op == OP_SETUP && st == S_IDLE) begin
              word_q    <= cmd_word;
              req_q     <= 1'b1;
              dav_q     <= 1'b1;
              got_grant <= 1'b0;
              got_drcv  <= 1'b0;
              illegal   <= 1'b0;
              st        <= S_SETUP;
            end else if (cmd_op == OP_SEND && st == S_HOLD) begin
              word_q <= cmd_word;
              dav_q  <= 1'b0;
              st     <= S_DROP;
            end
          end
        end
        S_SETUP: begin
          logic g, d;
          g = got_grant || net_bwd.grant;
          d = got_drcv  || drcv_rise;
          got_grant <= g;
          got_drcv  <= d;
          tmr       <= tmr + 1'b1;
          if (g && d) begin
            res   <= RES_OK;
            done  <= 1'b1;
            dav_q <= 1'b0;
            st    <= S_HOLD;
          end else if ((!g && tmr >= TW'(T_ROUTE - 1)) || (g && tmr >= TW'(T_DATA - 1))) begin
            res     <= g ? RES_ERR : RES_BLK;
            illegal <= d && !g;
            done    <= 1'b1;
            dav_q   <= 1'b0;
            st      <= S_HOLD;
          end
        end
        S_DROP: begin
          // wait for the destination to lower DRCV before the next edge
          tmr <= tmr + 1'b1;
          if (!net_bwd.drcv || tmr >= TW'(T_DATA - 1)) begin
            dav_q <= 1'b1;
            tmr   <= '0;
            st    <= S_SEND;
          end
        end
        S_SEND: begin
          tmr <= tmr + 1'b1;
          if (drcv_rise || tmr >= TW'(T_DATA - 1)) begin
            res   <= drcv_rise ? RES_OK : RES_ERR;
            done  <= 1'b1;
            dav_q <= 1'b0;
            st    <= S_HOLD;
          end
        end
        default: st <= S_IDLE;
      endcase
      // release is accepted in every state and aborts a command in progress
      if (cmd_valid && cmd_op == OP_RELEASE) begin
        req_q  <= 1'b0;
        dav_q  <= 1'b0;
        word_q <= '0;
        res    <= RES_OK;
        done   <= 1'b1;
        st     <= S_IDLE;
      end
    end
  end

  // DAV is only raised while a path is requested.
  a_dav_needs_req: assert property (@(posedge clk) disable iff (!rst_n) dav_q |-> req_q);

endmodule
