// Receive half of the cell delineation and scrambling block.
//
// The received octet stream runs through the recursive parallel syndrome
// generator, whose five-octet delay line also delays the data. The
// delineation controller hunts for a header byte by byte (sliding syndrome,
// one check per octet), then verifies one header per cell in PRESYNC and
// SYNC. During the five header octets after a cell-by-cell check the error
// pattern generator turns the syndrome into a single-bit correction that is
// XORed into the delayed data. Payload octets are then descrambled with the
// self-synchronous x^43 + 1 descrambler while the receiver is in PRESYNC or
// SYNC; in HUNT the data passes unchanged.
//
// Interface: one octet per clock on rx_data. Every output is registered and
// refers to the same octet as rx_data_o. An octet sampled at edge t leaves
// at edge t+5 (four more shifts to the end of the delay line, then the
// output register), so rx_cell_sync_o marks the first header octet five
// clocks after it arrived, one clock after its header was fully received
// and checked.
// rx_hdr_o marks the five header octets, rx_payload_o the descrambled
// payload octets, rx_corr_o an octet that had a bit corrected. rx_syn_en_o,
// rx_err_detect_o, rx_err_o, rx_herr_o and rx_dec_en_o are the controller's
// SYN-EN, ERR-DETECT, ERR, HERR and DEC-EN of the same cycle, delayed by
// the output register. ev_* are one-cycle event pulses (header found in
// HUNT, synchronisation lost, SYNC reached). The composition follows the
// original block diagram; the output register and the flags are this
// design's choices.
module cdsb_rx
  import atm_hec_pkg::*;
#(
  parameter int unsigned CELL_LEN = CELL_BYTES,
  parameter int unsigned ALPHA_N  = ALPHA,
  parameter int unsigned DELTA_N  = DELTA,
  parameter int unsigned TAP      = SCR_TAP
) (
  input  logic         clk,
  input  logic         rst_n,
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
  output logic         ev_sync_o
);

  logic [7:0]   syndrome, dly_data, mask, corrected;
  logic         syn_en, syn_clr, syn_sub;
  logic         err_detect, err, herr, dec_en, cell_sync;
  logic         corr_en, scr_en, correctable;
  logic [7:0]   corr_syn;
  logic [2:0]   corr_idx;
  logic         ev_found, ev_lost, ev_sync;
  delin_state_e state;

  recursive_syndrome u_syn (
    .clk, .rst_n, .en(syn_en), .clr(syn_clr), .sub(syn_sub),
    .din(rx_data), .syndrome(syndrome), .dout(dly_data)
  );

  delineation_ctrl #(
    .CELL_LEN(CELL_LEN), .ALPHA_N(ALPHA_N), .DELTA_N(DELTA_N)
  ) u_ctrl (
    .clk, .rst_n, .syndrome,
    .syn_en, .syn_clr, .syn_sub,
    .err_detect, .err, .herr, .dec_en, .cell_sync, .state,
    .corr_en, .corr_syn, .corr_idx, .scr_en,
    .ev_found, .ev_lost, .ev_sync
  );

  error_pattern u_pat (
    .syndrome(corr_syn), .byte_idx(corr_idx), .mask(mask), .correctable(correctable)
  );

  assign corrected = dly_data ^ (corr_en ? mask : 8'h00);

  ssc_scrambler #(.TAP(TAP), .DESCRAMBLE(1'b1)) u_dscr (
    .clk, .rst_n, .en(scr_en), .din(corrected), .dout(rx_data_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_cell_sync_o  <= 1'b0;
      rx_hdr_o        <= 1'b0;
      rx_payload_o    <= 1'b0;
      rx_corr_o       <= 1'b0;
      rx_state_o      <= ST_HUNT;
      rx_syn_en_o     <= 1'b0;
      rx_err_detect_o <= 1'b0;
      rx_err_o        <= 1'b0;
      rx_herr_o       <= 1'b0;
      rx_dec_en_o     <= 1'b0;
      ev_found_o      <= 1'b0;
      ev_lost_o       <= 1'b0;
      ev_sync_o       <= 1'b0;
    end else begin
      rx_cell_sync_o  <= cell_sync;
      rx_hdr_o        <= corr_en;
      rx_payload_o    <= scr_en;
      rx_corr_o       <= corr_en && correctable && (mask != 8'h00);
      rx_state_o      <= state;
      rx_syn_en_o     <= syn_en;
      rx_err_detect_o <= err_detect;
      rx_err_o        <= err;
      rx_herr_o       <= herr;
      rx_dec_en_o     <= dec_en;
      ev_found_o      <= ev_found;
      ev_lost_o       <= ev_lost;
      ev_sync_o       <= ev_sync;
    end
  end

endmodule
