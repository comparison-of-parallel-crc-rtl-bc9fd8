// Algorithm "Successive": syndrome of the five most recently received octets
// using one kind of multiplier only.
//
// Five subsyndrome registers form a chain. The first loads the new octet;
// every later register loads R[x^8 * previous register], so an octet that
// has moved k stages holds R[x^(8k) B]. The sum of all five registers is the
// syndrome of the last five octets, the same value as the Direct algorithm,
// but built from four identical x^8 networks.
//
// Interface: din is sampled on every rising clk edge while en is high.
// syndrome is combinational from the registers: in the cycle after the edge
// that sampled octet k it is the syndrome of octets k-4..k. Reset clears all
// stages. Structure follows the original block diagram; enable and reset are
// this design's additions. WIN (default 5, the header length) sets the
// number of stages; each extra octet adds one register and one x^8 network.
module successive_syndrome
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

  // stage_q[0] = S5 (newest octet), stage_q[4] = S1 (x^32 times oldest)
  logic [WIN-1:0][7:0] stage_q;
  logic [WIN-1:0][7:0] stage_d;

  assign stage_d[0] = din;
  for (genvar i = 1; i < WIN; i++) begin : g_mul
    gf_mul_xn #(.N(8)) u_x8 (.d(stage_q[i-1]), .y(stage_d[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  stage_q <= '0;
    else if (en) stage_q <= stage_d;
  end

  always_comb begin
    syndrome = 8'h00;
    for (int i = 0; i < WIN; i++) syndrome ^= stage_q[i];
  end

endmodule
