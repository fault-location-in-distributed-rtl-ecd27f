// 2-by-2 interchange box with distributed routing control.
//
// The box is a switching element plus a control unit. The control unit pulls
// the routing tag off each input's data lines: when an input raises REQ, bit
// STAGE of its tag picks the upper (0) or the lower (1) output. If that output
// is free the input is connected to it on the next clock edge and stays
// connected while REQ is held; dropping REQ releases it. When both inputs want
// the same free output in the same cycle the upper input wins and the lower
// one keeps waiting (blocked); a blocked input retries every cycle until the
// output frees or its source drops REQ.
//
// The connections form a 4-bit box state, numbered as in the 16-setting table:
//   bit 3 upper input -> upper output    bit 2 upper input -> lower output
//   bit 1 lower input -> lower output    bit 0 lower input -> upper output
// so straight is S10 (4'b1010), exchange S5 (4'b0101) and the broadcasts S3
// and S12. The switching element forwards data, parity, REQ and DAV along the
// state; an output with no driver carries all zeros (every line negated);
// an output driven by both inputs carries their overwrite: bits on which the
// inputs agree pass, bits on which they differ take the value ow_val. GRANT
// and DRCV return through the same state; an input joined to two outputs
// gets the AND of both, so an error (negated return) on either reaches it.
//
// Fault model: with flt_en set, the box takes state flt_s10 whenever its
// control asks for straight and flt_s5 whenever it asks for exchange, which
// models a box stuck in one state or answering wrongly but consistently.
// The fault inputs are tied off in normal use.
//
// Timing: connection set-up takes one clock per box; data and protocol lines
// then pass through combinationally, as in a circuit-switched path.
// The conflict rule (upper input first) and active-high protocol lines are
// this design's choices; the routing rule, state numbering and overwrite
// behaviour follow the fault analysis the box is built for.
module interchange_box
  import dcn_pkg::*;
#(
  parameter int unsigned STAGE = 0   // bit of the routing tag this box examines
) (
  input  logic       clk,
  input  logic       rst_n,
  input  fwd_t       in_fwd  [2],   // [0] upper input, [1] lower input
  output bwd_t       in_bwd  [2],
  output fwd_t       out_fwd [2],   // [0] upper output, [1] lower output
  input  bwd_t       out_bwd [2],
  input  logic       flt_en,
  input  logic [3:0] flt_s10,       // state taken when straight is requested
  input  logic [3:0] flt_s5,        // state taken when exchange is requested
  input  logic       ow_val,        // value of an overwritten, disagreeing bit
  output logic [3:0] state          // state actually applied (for observation)
);

  // Control unit: per input, connected flag and the output it holds.
  logic [1:0] conn_q, conn_d;
  logic [1:0] port_q, port_d;       // port_q[j] = output held by input j

  always_comb begin
    logic want0, want1;
    logic busy0, busy1;             // busy<o>: output o held
    conn_d = conn_q;
    port_d = port_q;
    // releases first, so an output freed on this edge can be taken by the
    // other, waiting input on the same edge
    for (int j = 0; j < 2; j++)
      if (conn_q[j] && !in_fwd[j].req) conn_d[j] = 1'b0;
    busy0 = (conn_d[0] && port_d[0] == 1'b0) || (conn_d[1] && port_d[1] == 1'b0);
    busy1 = (conn_d[0] && port_d[0] == 1'b1) || (conn_d[1] && port_d[1] == 1'b1);
    want0 = in_fwd[0].data[STAGE];
    want1 = in_fwd[1].data[STAGE];
    // upper input first
    if (!conn_q[0] && in_fwd[0].req && !(want0 ? busy1 : busy0)) begin
      conn_d[0] = 1'b1;
      port_d[0] = want0;
      if (want0) busy1 = 1'b1; else busy0 = 1'b1;
    end
    if (!conn_q[1] && in_fwd[1].req && !(want1 ? busy1 : busy0)) begin
      conn_d[1] = 1'b1;
      port_d[1] = want1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conn_q <= '0;
      port_q <= '0;
    end else begin
      conn_q <= conn_d;
      port_q <= port_d;
    end
  end

  // State requested by the control unit.
  logic [3:0] ctl_state;
  logic       want_s10, want_s5;
  always_comb begin
    ctl_state    = '0;
    ctl_state[3] = conn_q[0] && port_q[0] == 1'b0;
    ctl_state[2] = conn_q[0] && port_q[0] == 1'b1;
    ctl_state[1] = conn_q[1] && port_q[1] == 1'b1;
    ctl_state[0] = conn_q[1] && port_q[1] == 1'b0;
    want_s10     = ctl_state[3] || ctl_state[1];
    want_s5      = ctl_state[2] || ctl_state[0];
  end

  always_comb begin
    if (flt_en && want_s10)      state = flt_s10;
    else if (flt_en && want_s5)  state = flt_s5;
    else                         state = ctl_state;
  end

  // Overwrite of two forward bundles driving one output.
  function automatic fwd_t merge(input fwd_t a, input fwd_t b, input logic ov);
    logic [$bits(fwd_t)-1:0] va, vb;
    va = a;
    vb = b;
    return fwd_t'((va & vb) | ((va ^ vb) & {$bits(fwd_t){ov}}));
  endfunction

  // Switching element, forward direction.
  always_comb begin
    // upper output: upper input via bit 3, lower input via bit 0
    unique case ({state[3], state[0]})
      2'b10:   out_fwd[0] = in_fwd[0];
      2'b01:   out_fwd[0] = in_fwd[1];
      2'b11:   out_fwd[0] = merge(in_fwd[0], in_fwd[1], ow_val);
      default: out_fwd[0] = '0;
    endcase
    // lower output: upper input via bit 2, lower input via bit 1
    unique case ({state[2], state[1]})
      2'b10:   out_fwd[1] = in_fwd[0];
      2'b01:   out_fwd[1] = in_fwd[1];
      2'b11:   out_fwd[1] = merge(in_fwd[0], in_fwd[1], ow_val);
      default: out_fwd[1] = '0;
    endcase
  end

  // Switching element, return direction: AND over the outputs joined to an input.
  always_comb begin
    unique case ({state[3], state[2]})
      2'b10:   in_bwd[0] = out_bwd[0];
      2'b01:   in_bwd[0] = out_bwd[1];
      2'b11:   in_bwd[0] = out_bwd[0] & out_bwd[1];
      default: in_bwd[0] = '0;
    endcase
    unique case ({state[0], state[1]})
      2'b10:   in_bwd[1] = out_bwd[0];
      2'b01:   in_bwd[1] = out_bwd[1];
      2'b11:   in_bwd[1] = out_bwd[0] & out_bwd[1];
      default: in_bwd[1] = '0;
    endcase
  end

  // In fault-free operation the two inputs never hold the same output.
  a_no_double_hold: assert property (@(posedge clk) disable iff (!rst_n)
    !(conn_q[0] && conn_q[1] && port_q[0] == port_q[1]));

endmodule
