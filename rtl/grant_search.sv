// Search for a message-grant line stuck asserted (fault group 5).
//
// Such a fault hides from the two-phase test; it shows only when a request
// that should be blocked still sees a grant. Given the request (src -> dest)
// that failed in normal operation, the search blocks that path on purpose at
// one stage after another and watches the grant at the source. To block the
// path at stage i, PE src^2**i first sets up a path to the same destination:
// its path joins the searched one at stage i and holds the output the
// searched request needs. Then src requests dest. The blocked box returns a
// negated grant; the source still sees it asserted exactly when the stuck
// line lies between the source and that box, i.e. when the faulty link's
// level k is above i. So "grant seen at stage i" holds for i < k and the
// search is a binary search for k over 0..n, ceil(log2(n+1)) trials (3 for
// n = 4). Each trial releases both paths and waits T_SETTLE cycles.
//
// Result: found_level = k and found_label = the label of the searched path
// at that level, the link whose grant line is stuck. When no trial sees a
// grant the result is level 0 (the last link, or no stuck grant line at
// all: the two cannot be told apart by blocking).
//
// Interface: start with src/dest; drives per-PE source-port commands
// (cmd_valid, cmd_op, cmd_word = routing tag dest) and reads back their done
// and result; done_flag stays high until the next start.
// cmd_word is a full word for the source port; its bits above the address
// field are the tag's unused bits and are always 0, as in every setup word. The choice of the
// blocking PE and the binary order are this design's.
module grant_search
  import dcn_pkg::*;
#(
  parameter int unsigned N        = N_PE,
  parameter int unsigned LOGN     = $clog2(N),
  parameter int unsigned T_SETTLE = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [LOGN-1:0]   src,
  input  logic [LOGN-1:0]   dest,
  output logic [N-1:0]      cmd_valid,
  output logic [1:0]        cmd_op,
  output logic [M_BITS-1:0] cmd_word,
  input  logic [N-1:0]      port_done,
  input  res_t              port_res [N],
  output logic              busy,
  output logic              done_flag,
  output logic [$clog2(LOGN+1)-1:0] found_level,
  output logic [LOGN-1:0]   found_label,
  output logic [2:0]        trials
);

  localparam logic [1:0] OP_SETUP = 2'd1, OP_RELEASE = 2'd3;
  typedef logic [$clog2(LOGN+1)-1:0] lvl_t;

  typedef enum logic [2:0] {G_IDLE, G_BLOCK, G_BLOCK_W, G_REQ, G_REQ_W, G_REL, G_REL_W, G_DONE} gst_t;
  gst_t st;

  logic [LOGN-1:0] s_q, d_q, b_q;   // b_q: blocker of the current trial
  lvl_t            lo, hi, mid;
  logic [N-1:0]    pending;
  logic [$clog2(T_SETTLE+1)-1:0] cnt;

  assign mid       = lvl_t'((32'(lo) + 32'(hi) + 1) / 2);
  assign busy      = (st != G_IDLE) && (st != G_DONE);
  assign done_flag = (st == G_DONE);

  // PE that blocks the searched path at stage mid-1
  function automatic logic [N-1:0] onehot(input logic [LOGN-1:0] pe);
    logic [N-1:0] v;
    v = '0;
    v[pe] = 1'b1;
    return v;
  endfunction

  logic [LOGN-1:0] blocker;
  always_comb begin
    blocker = s_q;
    for (int i = 0; i < LOGN; i++) if (i == 32'(mid) - 1) blocker[i] = ~s_q[i];
  end

  always_comb begin
    cmd_word = '0;
    cmd_word[LOGN-1:0] = d_q;
    cmd_valid = '0;
    cmd_op = OP_SETUP;
    unique case (st)
      G_BLOCK: cmd_valid = onehot(blocker);
      G_REQ:   cmd_valid = onehot(s_q);
      G_REL: begin
        cmd_valid = onehot(b_q) | onehot(s_q);
        cmd_op    = OP_RELEASE;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= G_IDLE;
      s_q         <= '0;
      d_q         <= '0;
      b_q         <= '0;
      lo          <= '0;
      hi          <= '0;
      pending     <= '0;
      cnt         <= '0;
      found_level <= '0;
      found_label <= '0;
      trials      <= '0;
    end else begin
      unique case (st)
        G_IDLE, G_DONE: begin
          if (start) begin
            s_q    <= src;
            d_q    <= dest;
            lo     <= '0;
            hi     <= lvl_t'(LOGN);
            trials <= '0;
            st     <= G_BLOCK;
          end
        end
        G_BLOCK: begin
          pending <= onehot(blocker);
          b_q     <= blocker;
          st      <= G_BLOCK_W;
        end
        G_BLOCK_W: if ((port_done & pending) != '0) st <= G_REQ;
        G_REQ: begin
          pending <= onehot(s_q);
          st      <= G_REQ_W;
        end
        G_REQ_W: begin
          if ((port_done & pending) != '0) begin
            // grant seen although blocked: the stuck line is above stage mid-1
            if (port_res[s_q] != RES_BLK) lo <= mid;
            else                          hi <= mid - 1'b1;
            trials <= trials + 1'b1;
            st     <= G_REL;
          end
        end
        G_REL: begin
          pending <= '0;
          cnt     <= '0;
          st      <= G_REL_W;
        end
        G_REL_W: begin
          cnt <= cnt + 1'b1;
          if (cnt >= ($bits(cnt))'(T_SETTLE - 1)) begin
            if (lo == hi) begin
              found_level <= lo;
              found_label <= LOGN'(path_label(N_STG'(s_q), N_STG'(d_q), 32'(lo)));
              st          <= G_DONE;
            end else begin
              st <= G_BLOCK;
            end
          end
        end
        default: st <= G_IDLE;
      endcase
    end
  end

endmodule
