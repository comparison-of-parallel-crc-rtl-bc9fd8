// Shared definitions for the ATM header-CRC (HEC) datapath and the cell
// delineation logic.
//
// The HEC is an 8-bit CRC over the 40-bit ATM header with generator
// g(x) = x^8 + x^2 + x + 1. Every XOR network in the design multiplies one
// octet B by a fixed power x^N and reduces modulo g(x); the network for
// R[x^N B] is the XOR of the columns R[x^(N+j)] selected by the set bits d_j
// of B. rem_xn() returns such a column, so all networks are built from g(x)
// at elaboration time instead of being typed in by hand.
//
// Bit convention: an octet is d7..d0 with d7 the first bit on the line and
// the highest power of x. A header [B1 B2 B3 B4 B5] has the d7 of B1 as the
// coefficient of x^39.
//
// ALPHA = 7 and DELTA = 6 are the hunt/presync/sync thresholds of the
// delineation state diagram. The 53-octet cell and the x^43 + 1
// self-synchronous scrambler tap are the values of the SDH-based ATM
// physical layer; the cell length is not given in the original description and is
// this design's choice.
package atm_hec_pkg;

  // Low eight bits of g(x) = x^8 + x^2 + x + 1 (the x^8 term is implicit).
  localparam logic [7:0] G_LOW = 8'h07;

  localparam int unsigned HDR_BYTES  = 5;   // assumed header length in octets
  localparam int unsigned CELL_BYTES = 53;  // ATM cell length in octets
  localparam int unsigned ALPHA      = 7;   // consecutive bad HECs to leave SYNC
  localparam int unsigned DELTA      = 6;   // consecutive good HECs to reach SYNC
  localparam int unsigned SCR_TAP    = 43;  // self-synchronous scrambler x^43 + 1

  typedef enum logic [1:0] {
    ST_HUNT    = 2'd0,
    ST_PRESYNC = 2'd1,
    ST_SYNC    = 2'd2
  } delin_state_e;

  // Multiply an 8-bit remainder by x and reduce modulo g(x).
  function automatic logic [7:0] mul_x(input logic [7:0] s);
    return {s[6:0], 1'b0} ^ (s[7] ? G_LOW : 8'h00);
  endfunction

  // R_g[x^n]: the syndrome of a single 1 at bit position n.
  function automatic logic [7:0] rem_xn(input int unsigned n);
    logic [7:0] r;
    r = 8'h01;
    for (int unsigned k = 0; k < n; k++) r = mul_x(r);
    return r;
  endfunction

  // R_g[x^n B] for one octet B, as the XOR of the columns R_g[x^(n+j)].
  function automatic logic [7:0] rem_xn_byte(input int unsigned n, input logic [7:0] b);
    logic [7:0] r;
    r = 8'h00;
    for (int unsigned j = 0; j < 8; j++)
      if (b[j]) r ^= rem_xn(n + j);
    return r;
  endfunction

endpackage
