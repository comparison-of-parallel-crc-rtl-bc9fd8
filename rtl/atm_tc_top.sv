// ATM transmission-convergence cell delineation and scrambling block.
//
// Two independent paths share a clock:
//  * Transmit (cdsb_tx): cells in, HEC inserted into the fifth octet,
//    payload scrambled with x^43 + 1, one octet per clock.
//  * Receive (cdsb_rx): octet stream in, cell boundaries found by checking
//    the header CRC byte by byte with the recursive syndrome generator,
//    then verified cell by cell; single-bit header errors corrected and the
//    payload descrambled.
// Alongside the receiver, the Direct and Successive syndrome generators
// watch the same received stream and output the syndrome of the last five
// received octets every cycle. They are the two other parallel CRC
// verification structures; their outputs equal the sliding syndrome the
// recursive generator forms in HUNT and are brought out for comparison.
//
// Interface: plain octet streams, see cdsb_tx and cdsb_rx. direct_syn_o and
// successive_syn_o are combinational from registers: in the cycle after
// the edge that sampled octet k they hold the syndrome of octets k-4..k.
// Default sizes: 53-octet cells, 5-octet header, ALPHA = 7, DELTA = 6.
module atm_tc_top
  import atm_hec_pkg::*;
#(
  parameter int unsigned CELL_LEN = CELL_BYTES,
  parameter int unsigned ALPHA_N  = ALPHA,
  parameter int unsigned DELTA_N  = DELTA,
  parameter int unsigned TAP      = SCR_TAP
) (
  input  logic         clk,
  input  logic         rst_n,
  // transmit
  input  logic         tx_sop,
  input  logic [7:0]   tx_data,
  output logic         tx_sop_o,
  output logic [7:0]   tx_data_o,
  // receive
  input  logic [7:0]   rx_data,
  output logic [7:0]   rx_data_o,
  output logic         rx_cell_sync_o,
  output logic         rx_hdr_o,
  output logic         rx_payload_o,
  output logic         rx_corr_o,
  output delin_state_e rx_state_o,
  output logic         rx_syn_en_o,
  output logic         rx_err_detect_o,
  output logic         rx_err_o,
  output logic         rx_herr_o,
  output logic         rx_dec_en_o,
  output logic         ev_found_o,
  output logic         ev_lost_o,
  output logic         ev_sync_o,
  // comparison syndromes of the last five received octets
  output logic [7:0]   direct_syn_o,
  output logic [7:0]   successive_syn_o
);

  cdsb_tx #(.CELL_LEN(CELL_LEN), .TAP(TAP)) u_tx (
    .clk, .rst_n, .tx_sop, .tx_data, .tx_sop_o, .tx_data_o
  );

  cdsb_rx #(
    .CELL_LEN(CELL_LEN), .ALPHA_N(ALPHA_N), .DELTA_N(DELTA_N), .TAP(TAP)
  ) u_rx (
    .clk, .rst_n, .rx_data,
    .rx_data_o, .rx_cell_sync_o, .rx_hdr_o, .rx_payload_o, .rx_corr_o,
    .rx_state_o, .rx_syn_en_o, .rx_err_detect_o, .rx_err_o, .rx_herr_o,
    .rx_dec_en_o, .ev_found_o, .ev_lost_o, .ev_sync_o
  );

  direct_syndrome u_direct (
    .clk, .rst_n, .en(1'b1), .din(rx_data), .syndrome(direct_syn_o)
  );

  successive_syndrome u_succ (
    .clk, .rst_n, .en(1'b1), .din(rx_data), .syndrome(successive_syn_o)
  );

endmodule
