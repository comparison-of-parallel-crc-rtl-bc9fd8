// Algorithm "Recursive": the parallel syndrome generator of the receiver.
//
// One 8-bit syndrome register S is updated once per octet through a single
// x^8 feedback network:      A = R[x^8 S] + B          (plain update)
// To slide the five-octet window by one octet, the effect of the octet that
// leaves the window is removed through an x^40 network:
//                            B' = A + R[x^40 B_old]    (sliding update)
// A multiplexer picks A (sub = 0) or B' (sub = 1). With clr high the
// feedback is forced to zero, so S restarts from the new octet; this is the
// "initialise to zero before the first byte" step. The hardware does not
// grow with the window length.
//
// A five-octet delay line carries the received data alongside; its output
// dout is the octet that entered five edges earlier, i.e. the first octet of
// the window whose syndrome S currently holds. The x^40 product of the
// octet about to leave the window is registered one cycle ahead (taken from
// the fourth stage), which keeps the x^40 network off the feedback path.
//
// Interface: on every rising edge the delay line shifts in din. If en is high
// S is updated as above (if en is low S holds). syndrome = S, dout = oldest
// octet of the delay line. Reset clears S, the delay line and the x^40
// register. Structure follows the original block diagram of the parallel
// syndrome generator; the clear input and the registered x^40 product at
// the fourth stage are this design's choices. WIN (default 5, the header
// length) sets the window: the removal network becomes x^(8 WIN) and the
// delay line WIN octets long; nothing else changes.
module recursive_syndrome
  import atm_hec_pkg::*;
#(
  parameter int unsigned WIN = HDR_BYTES   // window length in octets
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,       // SYN-EN: update the syndrome with din
  input  logic       clr,      // first octet: feedback treated as zero
  input  logic       sub,      // s: remove the octet leaving the window
  input  logic [7:0] din,
  output logic [7:0] syndrome,
  output logic [7:0] dout      // received data delayed by five octets
);

  logic [WIN-1:0][7:0] dly_q;   // dly_q[0] newest, dly_q[WIN-1] oldest
  logic [7:0] s_q, x40_q;
  logic [7:0] fb, x8_s, x40_d, sum_a, sum_b, s_d;

  gf_mul_xn #(.N(8))             u_x8  (.d(s_q),      .y(x8_s));
  gf_mul_xn #(.N(8 * WIN))       u_x40 (.d(dly_q[WIN-2]), .y(x40_d));

  always_comb begin
    fb    = clr ? 8'h00 : x8_s;
    sum_a = fb ^ din;
    sum_b = sum_a ^ x40_q;
    s_d   = sub ? sum_b : sum_a;     // sB + s'A
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly_q <= '0;
      x40_q <= '0;
      s_q   <= '0;
    end else begin
      dly_q <= {dly_q[WIN-2:0], din};
      x40_q <= x40_d;
      if (en) s_q <= s_d;
    end
  end

  assign syndrome = s_q;
  assign dout     = dly_q[WIN-1];

endmodule
