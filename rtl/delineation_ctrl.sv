// Cell delineation controller: HUNT / PRESYNC / SYNC state machine and the
// control signals of the receiver's syndrome generator and header
// correction.
//
// How it works. The controller watches the syndrome of the recursive
// syndrome generator and keeps, in pos_q, the position (0..CELL_BYTES-1) of
// the octet currently at the end of the generator's five-octet delay line;
// position 0 is the first header octet.
//  * HUNT: the syndrome is checked byte by byte. After (re)start the
//    generator is cleared on the first octet and fills for five octets with
//    plain updates; from then on every update is a sliding one (sub = 1) so
//    the syndrome always covers the last five octets and is checked every
//    cycle (err_detect). A zero syndrome means a header starts at the octet
//    leaving the delay line: cell_sync is raised and the state goes to
//    PRESYNC. A nonzero one raises err and herr.
//  * PRESYNC and SYNC: the syndrome is computed cell by cell. syn_en is
//    high for the five octets of the next expected header (clear on the
//    first), the result is checked once per cell when that header's first
//    octet leaves the delay line (pos 0), and the syndrome register then
//    holds still for the rest of the cell.
//  * Transitions: HUNT -> PRESYNC on a correct HEC; PRESYNC -> HUNT on an
//    incorrect HEC; PRESYNC -> SYNC after DELTA consecutive correct HECs;
//    SYNC -> HUNT after ALPHA consecutive incorrect HECs. A correct HEC is a
//    zero syndrome. The correct HEC found in HUNT is not counted towards
//    DELTA. On the way back to HUNT the check cycle itself performs a
//    sliding update, so hunting resumes one octet after the failed header
//    without a refill.
//  * Correction: for the five header octets after each cell-by-cell check
//    the syndrome and the octet index go to the error-pattern generator
//    (corr_en, corr_syn, corr_idx); a single-bit error is XORed out there.
//  * Payload octets (pos >= HDR_BYTES) in PRESYNC and SYNC are marked for
//    descrambling (scr_en).
//
// Timing: all outputs are combinational from the registers and the
// syndrome input and refer to the current cycle's delay-line output.
// Signal names follow the original timing diagram (SYN-EN, ERR-DETECT, ERR,
// HERR, DEC-EN, CELL-SYNC); their exact cycle relations, the counter
// behaviour and the resume-without-refill are this design's choices.
// DEC-EN is taken to mark the header decoding window: always in HUNT, and
// from the first syndrome octet of a header until its last corrected octet
// has left the delay line otherwise.
module delineation_ctrl
  import atm_hec_pkg::*;
#(
  parameter int unsigned CELL_LEN = CELL_BYTES,
  parameter int unsigned ALPHA_N  = ALPHA,
  parameter int unsigned DELTA_N  = DELTA
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [7:0]   syndrome,
  // syndrome generator control
  output logic         syn_en,      // SYN-EN
  output logic         syn_clr,
  output logic         syn_sub,     // multiplexer select s
  // status
  output logic         err_detect,  // ERR-DETECT: syndrome examined now
  output logic         err,         // ERR: nonzero syndrome examined
  output logic         herr,        // HERR: HEC error while in HUNT
  output logic         dec_en,      // DEC-EN: header decoding window
  output logic         cell_sync,   // CELL-SYNC: first header octet now
  output delin_state_e state,
  // header correction
  output logic         corr_en,
  output logic [7:0]   corr_syn,
  output logic [2:0]   corr_idx,
  // payload
  output logic         scr_en,
  // event pulses for monitoring
  output logic         ev_found,    // HUNT -> PRESYNC
  output logic         ev_lost,     // PRESYNC/SYNC -> HUNT
  output logic         ev_sync      // PRESYNC -> SYNC
);

  localparam int unsigned PW = $clog2(CELL_LEN);
  localparam int unsigned CW = $clog2((ALPHA_N > DELTA_N ? ALPHA_N : DELTA_N) + 1);
  localparam int unsigned FW = $clog2(HDR_BYTES + 1);

  delin_state_e state_q, state_d;
  logic [PW-1:0] pos_q, pos_d;
  logic [FW-1:0] fill_q, fill_d;
  logic [CW-1:0] dcnt_q, dcnt_d, acnt_q, acnt_d;
  logic          cact_q, cact_d;
  logic [7:0]    csyn_q, csyn_d;
  logic [2:0]    cidx_q, cidx_d;

  logic hunt, check, zero, found, lose;

  always_comb begin
    hunt  = (state_q == ST_HUNT);
    zero  = (syndrome == 8'h00);
    check = hunt ? (fill_q == FW'(HDR_BYTES)) : (pos_q == '0);
    found = hunt && check && zero;
    lose  = !hunt && check && !zero &&
            (state_q == ST_PRESYNC || acnt_q == CW'(ALPHA_N - 1));

    if (hunt) begin
      syn_en  = 1'b1;
      syn_clr = (fill_q == '0);
      syn_sub = check;
    end else if (lose) begin
      syn_en  = 1'b1;
      syn_clr = 1'b0;
      syn_sub = 1'b1;
    end else begin
      syn_en  = (pos_q >= PW'(CELL_LEN - HDR_BYTES));
      syn_clr = (pos_q == PW'(CELL_LEN - HDR_BYTES));
      syn_sub = 1'b0;
    end

    err_detect = check;
    err        = check && !zero;
    herr       = hunt && check && !zero;
    cell_sync  = found || (!hunt && check);
    dec_en     = hunt || syn_en || cell_sync || cact_q;
    state      = state_q;

    corr_en  = cell_sync || cact_q;
    corr_syn = cell_sync ? syndrome : csyn_q;
    corr_idx = cell_sync ? 3'd0 : cidx_q;

    scr_en   = !hunt && !lose && (pos_q >= PW'(HDR_BYTES));

    ev_found = found;
    ev_lost  = lose;
    ev_sync  = (state_q == ST_PRESYNC) && check && zero &&
               (dcnt_q == CW'(DELTA_N - 1));

    // next state
    state_d = state_q;
    fill_d  = fill_q;
    pos_d   = (pos_q == PW'(CELL_LEN - 1)) ? '0 : pos_q + 1'b1;
    dcnt_d  = dcnt_q;
    acnt_d  = acnt_q;
    unique case (state_q)
      ST_HUNT: begin
        fill_d = (fill_q == FW'(HDR_BYTES)) ? fill_q : fill_q + 1'b1;
        if (found) begin
          state_d = ST_PRESYNC;
          pos_d   = PW'(1);
          dcnt_d  = '0;
        end
      end
      ST_PRESYNC: begin
        if (check) begin
          if (!zero) begin
            state_d = ST_HUNT;
            fill_d  = FW'(HDR_BYTES);
          end else if (ev_sync) begin
            state_d = ST_SYNC;
            acnt_d  = '0;
          end else begin
            dcnt_d = dcnt_q + 1'b1;
          end
        end
      end
      ST_SYNC: begin
        if (check) begin
          if (zero) begin
            acnt_d = '0;
          end else if (lose) begin
            state_d = ST_HUNT;
            fill_d  = FW'(HDR_BYTES);
          end else begin
            acnt_d = acnt_q + 1'b1;
          end
        end
      end
      default: state_d = ST_HUNT;
    endcase

    cact_d = cell_sync ? 1'b1 : (cidx_q == 3'(HDR_BYTES - 1) ? 1'b0 : cact_q);
    cidx_d = cell_sync ? 3'd1 : cidx_q + 1'b1;
    csyn_d = cell_sync ? syndrome : csyn_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_HUNT;
      pos_q   <= '0;
      fill_q  <= '0;
      dcnt_q  <= '0;
      acnt_q  <= '0;
      cact_q  <= 1'b0;
      csyn_q  <= '0;
      cidx_q  <= '0;
    end else begin
      state_q <= state_d;
      pos_q   <= pos_d;
      fill_q  <= fill_d;
      dcnt_q  <= dcnt_d;
      acnt_q  <= acnt_d;
      cact_q  <= cact_d;
      csyn_q  <= csyn_d;
      cidx_q  <= cidx_d;
    end
  end

  // Clearing the syndrome register is only meaningful on an update.
  assert property (@(posedge clk) disable iff (!rst_n) syn_clr |-> syn_en);
  // HUNT never requests correction of a nonzero syndrome.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (hunt && cell_sync) |-> zero);

endmodule
