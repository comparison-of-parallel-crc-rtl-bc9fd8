// Octet-parallel self-synchronous scrambler / descrambler, polynomial
// x^TAP + 1 (TAP = 43 for SDH-based ATM transmission).
//
// Serially, the scrambler sends c(t) = a(t) xor c(t-TAP) and the
// descrambler recovers a(t) = c(t) xor c(t-TAP); both keep the last TAP
// line (scrambled) bits. Here eight bits are handled per clock, d7 first:
// bit j of the octet in line order is combined with history bit TAP-1-j,
// since TAP > 8 every needed bit is already in the history. Only payload
// octets are scrambled: when en is low the octet passes unchanged and the
// history holds, so the header octets are skipped as if absent from the
// bit stream.
//
// Interface: din / en sampled on each rising clk edge; dout is registered
// (latency one cycle). DESCRAMBLE = 0 scrambles (history fed with output
// bits), DESCRAMBLE = 1 descrambles (history fed with input bits). Reset
// clears the history and the output. Payload-only scrambling follows the
// original description; the bit order and reset are this design's choices.
module ssc_scrambler
  import atm_hec_pkg::*;
#(
  parameter int unsigned TAP        = SCR_TAP,
  parameter bit          DESCRAMBLE = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] din,
  output logic [7:0] dout
);

  // hist_q[0] = most recent line bit, hist_q[TAP-1] = TAP bits ago
  logic [TAP-1:0] hist_q;
  logic [7:0]     res;      // result octet, d7 first
  logic [7:0]     line;     // octet as it appears on the line

  always_comb begin
    for (int j = 0; j < 8; j++)            // j = 0 is d7, the first bit
      res[7-j] = din[7-j] ^ hist_q[TAP-1-j];
    line = DESCRAMBLE ? din : res;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q <= '0;
      dout   <= '0;
    end else if (en) begin
      hist_q <= {hist_q[TAP-9:0], line};
      dout   <= res;
    end else begin
      dout   <= din;
    end
  end

endmodule
