// Constant multiplier "x^N" of the HEC datapath: y = R_g[x^N * d] for one
// octet d, with g(x) = x^8 + x^2 + x + 1.
//
// The circuit is a pure XOR network. Output bit s_i is the XOR of the input
// bits d_j for which bit i of R_g[x^(N+j)] is 1; the column table COL is
// computed from g(x) at elaboration. N = 8 gives the update network of the
// Successive and Recursive syndrome generators, N = 8, 16, 24, 32 the four
// networks of the Direct generator and N = 40 the network that removes the
// oldest octet from a sliding five-octet syndrome. The original derivation obtains the
// same networks by summing byte-syndrome columns; building them from g(x)
// is this design's choice and lets N be any value.
//
// Interface: d (octet in), y (remainder out). Purely combinational.
module gf_mul_xn
  import atm_hec_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [7:0] d,
  output logic [7:0] y
);

  function automatic logic [7:0][7:0] build_cols();
    logic [7:0][7:0] c;
    for (int unsigned j = 0; j < 8; j++) c[j] = rem_xn(N + j);
    return c;
  endfunction

  localparam logic [7:0][7:0] COL = build_cols();

  always_comb begin
    y = 8'h00;
    for (int j = 0; j < 8; j++)
      if (d[j]) y ^= COL[j];
  end

endmodule
