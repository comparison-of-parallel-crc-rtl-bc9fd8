// Algorithm "Direct": syndrome of the WIN (default five) most recently
// received octets.
//
// A five-octet shift buffer holds [B1 B2 B3 B4 B5], B5 the newest. Each
// octet goes through its own fixed XOR network, x^32 for B1 down to x^0 for
// B5, and a final XOR "adder" sums the five subsyndromes:
//   S = R[x^32 B1] + R[x^24 B2] + R[x^16 B3] + R[x^8 B4] + B5.
// Hardware grows with the number of octets covered and the critical path is
// a multiplier followed by a five-input XOR.
//
// Interface: din is sampled on every rising clk edge while en is high.
// syndrome is combinational from the buffer: in the cycle after the edge that
// sampled octet k it is the syndrome of octets k-4..k. Reset clears the
// buffer (an all-zero window, syndrome 0). Structure follows the original
// block diagram; the enable and reset are this design's additions. WIN
// (default 5, the header length) sets the window; each extra octet adds one
// more multiplier, x^(8(WIN-1)).
module direct_syndrome
  import atm_hec_pkg::*;
#(
  parameter int unsigned WIN = HDR_BYTES   // window length in octets
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] din,
  output logic [7:0] syndrome
);

  // buf_q[0] = newest octet (B5), buf_q[4] = oldest (B1)
  logic [WIN-1:0][7:0] buf_q;
  logic [WIN-1:0][7:0] sub;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  buf_q <= '0;
    else if (en) buf_q <= {buf_q[WIN-2:0], din};
  end

  for (genvar i = 0; i < WIN; i++) begin : g_mul
    gf_mul_xn #(.N(8 * i)) u_mul (.d(buf_q[i]), .y(sub[i]));
  end

  always_comb begin
    syndrome = 8'h00;
    for (int i = 0; i < WIN; i++) syndrome ^= sub[i];
  end

endmodule
