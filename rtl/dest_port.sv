// Network to destination PE interface port.
//
// Receives one network output. Message grant GRANT is returned while a
// request (REQ) is present at the port, so the source learns that a complete
// path exists. Each rising edge of data available DAV gates the word in
// (while REQ is present: an edge on an idle output is ignored). The
// first word after REQ rises is the routing tag: it is accepted when both
// parity bits check (even parity per byte) and its destination-address field,
// bits LOGN-1..0, equals the port's own address. Every later word only needs
// correct parity. An accepted word raises data received DRCV, which falls
// again when DAV falls (edge-sensitive four-phase handshake); a rejected word
// leaves DRCV low so that the source's data timer reports the error.
//
// Towards the PE the port shows each gated-in word for one cycle (rx_valid)
// with its check results. GRANT and DRCV are registered: one cycle after REQ
// and after the DAV edge respectively. Returning GRANT for any arriving
// request, independent of the tag check, is this design's reading of the
// protocol.
module dest_port
  import dcn_pkg::*;
#(
  parameter int unsigned LOGN = N_STG
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LOGN-1:0]   my_addr,
  input  fwd_t              net_fwd,
  output bwd_t              net_bwd,
  output logic              rx_valid,
  output logic [M_BITS-1:0] rx_word,
  output logic              rx_is_tag,
  output logic              rx_par_ok,
  output logic              rx_addr_ok
);

  logic dav_prev;
  logic tag_seen;      // routing tag already gated in for this request
  logic grant_q, drcv_q;

  assign net_bwd.grant = grant_q;
  assign net_bwd.drcv  = drcv_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dav_prev   <= 1'b0;
      tag_seen   <= 1'b0;
      grant_q    <= 1'b0;
      drcv_q     <= 1'b0;
      rx_valid   <= 1'b0;
      rx_word    <= '0;
      rx_is_tag  <= 1'b0;
      rx_par_ok  <= 1'b0;
      rx_addr_ok <= 1'b0;
    end else begin
      dav_prev <= net_fwd.dav;
      grant_q  <= net_fwd.req;
      rx_valid <= 1'b0;
      if (!net_fwd.req) tag_seen <= 1'b0;
      if (!net_fwd.dav) drcv_q <= 1'b0;
      if (net_fwd.req && net_fwd.dav && !dav_prev) begin
        logic pok, aok;
        pok = (byte_parity(net_fwd.data) == net_fwd.par);
        aok = (net_fwd.data[LOGN-1:0] == my_addr);
        rx_valid   <= 1'b1;
        rx_word    <= net_fwd.data;
        rx_is_tag  <= !tag_seen;
        rx_par_ok  <= pok;
        rx_addr_ok <= aok;
        tag_seen   <= 1'b1;
        drcv_q     <= pok && (tag_seen || aok);
      end
    end
  end

endmodule
