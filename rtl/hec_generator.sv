// HEC generator of the transmitter.
//
// The HEC is the remainder of the first four header octets, shifted up by
// eight bits, divided by g(x) = x^8 + x^2 + x + 1:  HEC = R_g[x^8 B1B2B3B4].
// It is computed with the same recursive update as the receiver's syndrome
// generator, S <- R[x^8 S] + B, over B1..B4 (S cleared on B1), and in the
// fifth octet slot the value R[x^8 S] replaces whatever the input carries.
// With the HEC in place the whole 40-bit header is divisible by g(x).
//
// Interface: one octet per clock. sop marks the first header octet of a
// cell; octet positions are counted from the last sop and wrap every
// CELL_LEN octets, so sop is needed only once. dout, sop_o and payload_o are
// combinational (zero latency); payload_o marks octets after the header.
// The HEC computation follows the original description; the sop/position framing
// interface is this design's choice. No coset is added to the HEC.
module hec_generator
  import atm_hec_pkg::*;
#(
  parameter int unsigned CELL_LEN = CELL_BYTES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sop,
  input  logic [7:0] din,
  output logic [7:0] dout,
  output logic       sop_o,
  output logic       payload_o
);

  localparam int unsigned PW = $clog2(CELL_LEN);

  logic [PW-1:0] pos_q, pos;
  logic [7:0]    s_q, x8_s;

  gf_mul_xn #(.N(8)) u_x8 (.d(s_q), .y(x8_s));

  always_comb begin
    pos       = sop ? '0 : pos_q;
    dout      = (pos == PW'(HDR_BYTES - 1)) ? x8_s : din;
    sop_o     = (pos == '0);
    payload_o = (pos >= PW'(HDR_BYTES));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q <= '0;
      s_q   <= '0;
    end else begin
      pos_q <= (pos == PW'(CELL_LEN - 1)) ? '0 : pos + 1'b1;
      if (pos < PW'(HDR_BYTES - 1))
        s_q <= ((pos == '0) ? 8'h00 : x8_s) ^ din;
    end
  end

endmodule
