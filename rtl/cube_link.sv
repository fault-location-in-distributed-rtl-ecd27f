// One interconnection link of the network, with the link stuck-at fault model.
//
// A link carries the forward bundle (data, parity, REQ, DAV) from its driving
// side to its receiving side, and the return bundle (GRANT, DRCV) the other
// way. Normally it is a set of wires. When flt_en is set, the single line
// selected by flt_sig (numbered as in dcn_pkg: data bits, parity bits, REQ,
// DAV, GRANT, DRCV) is held at flt_val whatever is applied to it, which is
// the non-transient stuck-at-0/1 link fault that the fault analysis assumes.
// Purely combinational; no clock.
module cube_link
  import dcn_pkg::*;
(
  input  fwd_t       fwd_in,     // from the stage (or source port) before the link
  output fwd_t       fwd_out,    // to the stage (or destination port) after it
  input  bwd_t       bwd_in,     // returning from the side after the link
  output bwd_t       bwd_out,    // returning towards the side before it
  input  logic       flt_en,
  input  logic [$clog2(N_SIG)-1:0] flt_sig,
  input  logic       flt_val
);

  localparam int unsigned FW = $bits(fwd_t);   // forward lines, LSB = DAV

  // Position of each numbered line inside the packed forward bundle
  // {data, par, req, dav}: data bit k sits at FW-M_BITS+k, parity bit k at
  // 2+k, REQ at 1, DAV at 0.
  function automatic int unsigned fwd_pos(input int unsigned sig);
    if (sig < M_BITS)       return FW - M_BITS + sig;
    else if (sig < SIG_REQ) return 2 + (sig - M_BITS);
    else if (sig == SIG_REQ) return 1;
    else                    return 0;
  endfunction

  always_comb begin
    logic [FW-1:0] f;
    f = fwd_in;
    if (flt_en && 32'(flt_sig) < SIG_GRANT) f[fwd_pos(32'(flt_sig))] = flt_val;
    fwd_out = fwd_t'(f);
    bwd_out = bwd_in;
    if (flt_en && flt_sig == SIG_GRANT[$clog2(N_SIG)-1:0]) bwd_out.grant = flt_val;
    if (flt_en && flt_sig == SIG_DRCV[$clog2(N_SIG)-1:0])  bwd_out.drcv  = flt_val;
  end

endmodule
