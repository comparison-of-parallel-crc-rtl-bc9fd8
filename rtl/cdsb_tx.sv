// Transmit half of the cell delineation and scrambling block.
//
// Cells of CELL_LEN octets enter one octet per clock. The HEC generator
// writes the header CRC into the fifth octet, then the self-synchronous
// x^43 + 1 scrambler scrambles the payload octets while passing the header
// through. The output is ready for an octet-parallel SDH STM-1 payload
// (155.52 Mb/s, a 19.44 MHz octet clock).
//
// Interface: tx_sop marks the first octet of a cell (needed once; the cell
// grid then free-runs). The fifth input octet is a placeholder replaced by
// the HEC. tx_data_o / tx_sop_o follow the input by one clock. The split into
// HEC generation and payload scrambling follows the original description; the framing
// interface is this design's choice.
module cdsb_tx
  import atm_hec_pkg::*;
#(
  parameter int unsigned CELL_LEN = CELL_BYTES,
  parameter int unsigned TAP      = SCR_TAP
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_sop,
  input  logic [7:0] tx_data,
  output logic       tx_sop_o,
  output logic [7:0] tx_data_o
);

  logic [7:0] hec_data;
  logic       hec_sop, hec_pay;

  hec_generator #(.CELL_LEN(CELL_LEN)) u_hec (
    .clk, .rst_n, .sop(tx_sop), .din(tx_data),
    .dout(hec_data), .sop_o(hec_sop), .payload_o(hec_pay)
  );

  ssc_scrambler #(.TAP(TAP), .DESCRAMBLE(1'b0)) u_scr (
    .clk, .rst_n, .en(hec_pay), .din(hec_data), .dout(tx_data_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tx_sop_o <= 1'b0;
    else        tx_sop_o <= hec_sop;
  end

endmodule
