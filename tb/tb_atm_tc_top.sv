// End-to-end testbench for atm_tc_top at its default sizes (53-octet
// cells, ALPHA = 7, DELTA = 6, x^43 + 1 scrambler).
//
// The transmitter turns numbered cells into a line stream (HEC inserted,
// payload scrambled). A channel model feeds the receiver first with random
// octets, then with that stream, and damages chosen headers:
//   cells  9, 11: one bit flipped (to be corrected in SYNC)
//   cell  13    : two bits flipped (uncorrectable, SYNC kept)
//   cells 20..26: HEC damaged, seven in a row (SYNC lost)
//   cell  28    : HEC damaged (lost again while in PRESYNC)
// Every cycle the receiver output, five clocks behind its input, is
// checked: in SYNC every CELL-SYNC falls on a first header octet, header
// octets with at most one error come out intact and payload octets equal
// the transmitter's input. The Direct and Successive syndromes are compared
// with a long division of the last five received octets.
// Each mechanism (byte-by-byte miss, header found, PRESYNC->SYNC, SYNC
// lost, PRESYNC lost, single-bit correction, uncorrectable header, payload
// descrambling) is counted and must occur at least once.
module tb_atm_tc_top;
  import atm_hec_pkg::*;
  import tb_ref_pkg::*;

  localparam int LAT    = 5;
  localparam int GARB   = 131;
  localparam int NCELL  = 48;
  localparam int NCYC   = GARB + NCELL * 53 + 10;

  logic clk = 0, rst_n = 0;
  logic tx_sop = 0, tx_sop_o;
  logic [7:0] tx_data = '0, tx_data_o, rx_data = '0, rx_data_o;
  logic rx_cell_sync_o, rx_hdr_o, rx_payload_o, rx_corr_o;
  logic rx_syn_en_o, rx_err_detect_o, rx_err_o, rx_herr_o, rx_dec_en_o;
  logic ev_found_o, ev_lost_o, ev_sync_o;
  logic [7:0] direct_syn_o, successive_syn_o;
  delin_state_e rx_state_o;

  // transmitter input, by cell and position
  logic [7:0] orig [NCELL][53];
  // per receiver input cycle
  int cell_at [NCYC];
  int pos_at  [NCYC];
  int nerr_at [NCYC];
  logic [7:0] rxin [$];

  int checks = 0, failures = 0;
  int n_herr = 0, n_found = 0, n_sync = 0, n_lost_sync = 0, n_lost_pre = 0;
  int n_corr = 0, n_uncorr = 0, n_payload = 0, n_cells_sync = 0;

  atm_tc_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("t=%0t FAIL %s", $time, what);
    end
  endtask

  function automatic logic [39:0] damage(int c);
    if (c == 9)  return 40'h00_0400_0000;
    if (c == 11) return 40'h00_0000_0002;
    if (c == 13) return 40'h01_0000_8000;
    if ((c >= 20 && c <= 26) || c == 28) return 40'h00_0000_0081;
    return '0;
  endfunction

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter side: one cell after another, sop on the first octet
  initial begin
    for (int c = 0; c < NCELL; c++) begin
      orig[c][0] = 8'h3C;
      orig[c][1] = 8'(c >> 8);
      orig[c][2] = 8'(c);
      orig[c][3] = 8'hA2;
      orig[c][4] = 8'h00;
      for (int k = 5; k < 53; k++) orig[c][k] = 8'($urandom);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < NCELL; c++)
      for (int k = 0; k < 53; k++) begin
        tx_sop  = (k == 0);
        tx_data = orig[c][k];
        @(negedge clk);
      end
    tx_sop = 0;
  end

  // channel and receiver checks
  initial begin
    int tx_cell, tx_pos;
    bit started;
    logic [39:0] hdr_err;
    tx_cell = -1; tx_pos = 0; started = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    for (int n = 0; n < NCYC; n++) begin
      // receiver input for edge n
      if (n < GARB || rxin.size() == 0) begin
        rx_data = 8'($urandom);
        cell_at[n] = -1; pos_at[n] = -1; nerr_at[n] = 0;
      end else begin
        rx_data = rxin.pop_front();
        cell_at[n] = tx_cell_q.pop_front();
        pos_at[n]  = tx_pos_q.pop_front();
        hdr_err    = damage(cell_at[n]);
        nerr_at[n] = $countones(hdr_err);
        if (pos_at[n] < 5) rx_data ^= hdr_err[8*(4-pos_at[n]) +: 8];
      end
      @(posedge clk);
      #1;
      // collect transmitter output of this edge
      if (tx_sop_o) begin tx_cell++; tx_pos = 0; started = 1; end
      if (started && tx_cell < NCELL) begin
        rxin.push_back(tx_data_o);
        tx_cell_q.push_back(tx_cell);
        tx_pos_q.push_back(tx_pos);
        if (tx_pos < 4) check(tx_data_o == orig[tx_cell][tx_pos], "transmitted header");
        tx_pos++;
      end
      // comparison syndromes over the last five received octets
      hist.push_back(rx_data);
      if (hist.size() > 5) void'(hist.pop_front());
      if (hist.size() == 5) begin
        check(direct_syn_o == syn5(hist[0], hist[1], hist[2], hist[3], hist[4]), "Direct syndrome");
        check(successive_syn_o == direct_syn_o, "Successive syndrome");
      end
      // receiver output for the input of edge n-LAT
      if (n >= LAT) begin
        int d, c, p;
        d = n - LAT; c = cell_at[d]; p = pos_at[d];
        if (rx_herr_o) n_herr++;
        if (ev_found_o) n_found++;
        if (ev_sync_o) n_sync++;
        if (ev_lost_o && rx_state_o == ST_SYNC) n_lost_sync++;
        if (ev_lost_o && rx_state_o == ST_PRESYNC) n_lost_pre++;
        if (rx_state_o == ST_SYNC && c >= 0) begin
          check(rx_cell_sync_o == (p == 0), "CELL-SYNC in SYNC on first header octet");
          if (p == 0) n_cells_sync++;
          if (p >= 0 && p < 4 && nerr_at[d] <= 1) begin
            check(rx_data_o == orig[c][p], "received header octet");
            if (rx_corr_o) n_corr++;
          end
          if (p == 4 && nerr_at[d] <= 1 && rx_corr_o) n_corr++;
          if (p == 4 && nerr_at[d] <= 1)
            check(rx_data_o == hec4({orig[c][0], orig[c][1], orig[c][2], orig[c][3]}), "received HEC");
          if (p == 0 && nerr_at[d] == 2) n_uncorr++;
          if (p >= 5) begin
            check(rx_payload_o && rx_data_o == orig[c][p], "received payload");
            n_payload++;
          end
        end
      end
      @(negedge clk);
    end
    check(n_herr > 0,      "byte-by-byte misses seen");
    check(n_found > 0,     "header found in HUNT");
    check(n_sync >= 2,     "PRESYNC -> SYNC (twice)");
    check(n_lost_sync > 0, "SYNC lost after ALPHA bad headers");
    check(n_lost_pre > 0,  "PRESYNC lost on a bad header");
    check(n_corr >= 2,     "single-bit header corrections");
    check(n_uncorr > 0,    "uncorrectable header in SYNC");
    check(n_payload > 1000, "payload octets delivered");
    $display("herr %0d found %0d sync %0d lost(sync) %0d lost(presync) %0d corr %0d uncorr %0d payload %0d cells-in-sync %0d",
             n_herr, n_found, n_sync, n_lost_sync, n_lost_pre, n_corr, n_uncorr, n_payload, n_cells_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tx_cell_q [$];
  int tx_pos_q  [$];
  logic [7:0] hist [$];
endmodule
