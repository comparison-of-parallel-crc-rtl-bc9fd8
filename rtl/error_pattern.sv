// Error pattern generator for single-bit header correction.
//
// A single bit error at header position p (p = 39 for d7 of the first
// octet, p = 0 for d0 of the fifth) produces the syndrome R_g[x^p]. For
// header octet k (k = 0 for the first octet) and bit b the position is
// p = 8*(4-k) + b, so bit b of the pattern for octet k is set when the
// syndrome equals R_g[x^p]. The 40 syndromes of single errors are distinct,
// so at most one bit of one octet is ever selected; any other nonzero
// syndrome yields an all-zero pattern (no correction). correctable is high
// when the syndrome matches one of the 40 single-bit syndromes. The original
// shows this block only as a box fed by the syndrome; the comparison
// structure is this design's choice.
//
// Interface: purely combinational. syndrome and byte_idx in; mask (to be
// XORed into header octet byte_idx) and correctable out. byte_idx values
// of 5 and above give an all-zero mask.
module error_pattern
  import atm_hec_pkg::*;
(
  input  logic [7:0] syndrome,
  input  logic [2:0] byte_idx,
  output logic [7:0] mask,
  output logic       correctable
);

  localparam int unsigned HDR_BITS = 8 * HDR_BYTES;

  function automatic logic [HDR_BITS-1:0][7:0] build_single();
    logic [HDR_BITS-1:0][7:0] t;
    for (int unsigned p = 0; p < HDR_BITS; p++) t[p] = rem_xn(p);
    return t;
  endfunction

  localparam logic [HDR_BITS-1:0][7:0] SINGLE = build_single();

  always_comb begin
    mask        = 8'h00;
    correctable = 1'b0;
    for (int p = 0; p < HDR_BITS; p++) begin
      if (syndrome == SINGLE[p]) begin
        correctable = 1'b1;
        if (int'(byte_idx) == (HDR_BYTES - 1) - p / 8)
          mask[p % 8] = 1'b1;
      end
    end
  end

endmodule
