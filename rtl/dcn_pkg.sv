// Shared types, sizes and helper functions of the distributed-control
// generalized cube network and its two-phase fault-location procedure.
//
// A network link carries an m-bit data word, one even-parity bit per byte,
// and four protocol lines: message request (REQ) and data available (DAV)
// run from source to destination, message grant (GRANT) and data received
// (DRCV) run back from destination to source. All protocol lines are active
// high here. The default sizes are the 16-PE, 16-bit example configuration
// with the destination address in bits 3..0 of the routing-tag word.
package dcn_pkg;

  // Number of PEs (network inputs and outputs), N = 2**n.
  localparam int unsigned N_PE   = 16;
  localparam int unsigned N_STG  = 4;
  // Data path width m and number of parity bits (one per byte).
  localparam int unsigned M_BITS = 16;
  localparam int unsigned P_BITS = M_BITS / 8;

  // Index of each line of a link, used to select a line for a stuck-at fault:
  // 0..M_BITS-1 data, then the parity bits, then REQ, DAV, GRANT, DRCV.
  localparam int unsigned SIG_PAR0  = M_BITS;
  localparam int unsigned SIG_REQ   = M_BITS + P_BITS;
  localparam int unsigned SIG_DAV   = M_BITS + P_BITS + 1;
  localparam int unsigned SIG_GRANT = M_BITS + P_BITS + 2;
  localparam int unsigned SIG_DRCV  = M_BITS + P_BITS + 3;
  localparam int unsigned N_SIG     = M_BITS + P_BITS + 4;

  // Lines running from source towards destination.
  typedef struct packed {
    logic [M_BITS-1:0] data;
    logic [P_BITS-1:0] par;
    logic              req;
    logic              dav;
  } fwd_t;

  // Lines running from destination back towards the source.
  typedef struct packed {
    logic grant;
    logic drcv;
  } bwd_t;

  // Outcome of one subphase as seen by one source PE.
  //   OK  : grant and data received returned in time
  //   ERR : routing or parity error (grant returned, data received not)
  //   BLK : block (no grant within the routing timer)
  //   NONE: subphase not run for this PE
  typedef enum logic [1:0] {RES_NONE = 2'd0, RES_OK = 2'd1, RES_ERR = 2'd2, RES_BLK = 2'd3} res_t;

  // Per-PE record of one test phase.
  typedef struct packed {
    res_t setup;     // setup subphase
    res_t data;      // data transfer subphase (first failing word, or OK)
    logic illegal;   // data received seen without message grant
  } phase_rec_t;

  // Kind of component the locator points at.
  typedef enum logic [2:0] {
    LOC_NONE     = 3'd0,  // no fault detected
    LOC_BOX      = 3'd1,  // exactly one interchange box
    LOC_LINK     = 3'd2,  // exactly one link
    LOC_BOX_PAIR = 3'd3,  // two adjacent boxes and the link joining them
    LOC_BOX_OR_IN= 3'd4,  // one box or one of its input links
    LOC_PATH     = 3'd5   // only a faulty path is known; further tests needed
  } loc_kind_t;

  // Even parity of each byte: parity bit k is the XOR of bits 8k+7..8k.
  function automatic logic [P_BITS-1:0] byte_parity(input logic [M_BITS-1:0] w);
    logic [P_BITS-1:0] p;
    for (int k = 0; k < P_BITS; k++) p[k] = ^w[8*k +: 8];
    return p;
  endfunction

  // Label of the link at level lvl on the path from source s to destination d
  // under destination-tag routing. Level N_STG is the network input, level 0
  // the network output; stage i sits between levels i+1 and i and may change
  // bit i, so the label at level lvl is {d[n-1:lvl], s[lvl-1:0]}.
  function automatic logic [N_STG-1:0] path_label(input logic [N_STG-1:0] s,
                                                  input logic [N_STG-1:0] d,
                                                  input int unsigned lvl);
    logic [N_STG-1:0] hi_mask;
    hi_mask = '0;
    for (int b = 0; b < N_STG; b++) if (b >= lvl) hi_mask[b] = 1'b1;
    return (d & hi_mask) | (s & ~hi_mask);
  endfunction

endpackage
