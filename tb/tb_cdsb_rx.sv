// Testbench for cdsb_rx.
//
// The line stream is a random prefix followed by 20 cells of 53 octets whose
// payload octets are random line (scrambled) values; the expected payload is
// what a bit-serial x^43 + 1 descrambler makes of them. Random octets are
// redrawn if they would close a zero-syndrome window, so the receiver can
// only lock on genuine headers. Cells 8, 10 and 11 carry a single-bit header
// error at a random position, cell 13 a double error.
// Checked every cycle, LAT = 5 clocks after the octet entered:
//  * CELL-SYNC exactly on the first header octet of every cell 0..19;
//  * header octets restored for cells with at most one error, with the
//    correction flag on the repaired octet; ERR for every damaged header;
//  * payload octets equal to the reference descrambler once in SYNC;
//  * HERR while hunting through the prefix, SYNC reached at cell 6.
module tb_cdsb_rx;
  import atm_hec_pkg::*;
  import tb_ref_pkg::*;

  localparam int LAT    = 5;
  localparam int PREFIX = 75;
  localparam int NCELL  = 20;
  localparam int LEN    = PREFIX + NCELL * 53;

  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data = '0, rx_data_o;
  logic rx_cell_sync_o, rx_hdr_o, rx_payload_o, rx_corr_o;
  logic rx_syn_en_o, rx_err_detect_o, rx_err_o, rx_herr_o, rx_dec_en_o;
  logic ev_found_o, ev_lost_o, ev_sync_o;
  delin_state_e rx_state_o;

  logic [7:0] line [LEN];
  logic [7:0] want [LEN];     // expected output octet
  int         cell_of [LEN];
  int         pos_of  [LEN];
  logic [39:0] errpat [NCELL];
  int checks = 0, failures = 0;
  int syncs = 0, corrections = 0, herrs = 0, uncorrectable = 0, payload_ok = 0;
  int sync_cell = -1;
  ssc_model dscr;

  cdsb_rx dut (.clk, .rst_n, .rx_data, .rx_data_o, .rx_cell_sync_o, .rx_hdr_o,
               .rx_payload_o, .rx_corr_o, .rx_state_o, .rx_syn_en_o,
               .rx_err_detect_o, .rx_err_o, .rx_herr_o, .rx_dec_en_o,
               .ev_found_o, .ev_lost_o, .ev_sync_o);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("t=%0t FAIL %s", $time, what);
    end
  endtask

  function automatic bit zero_window(int i);
    if (i < 4) return 1'b0;
    return syn5(line[i-4], line[i-3], line[i-2], line[i-1], line[i]) == 8'h00;
  endfunction

  task automatic build();
    int i = 0;
    dscr = new(43);
    for (int c = 0; c < NCELL; c++) begin
      errpat[c] = '0;
      if (c == 8 || c == 10 || c == 11) errpat[c] = 40'(1) << $urandom_range(0, 39);
      if (c == 13) errpat[c] = 40'h80_0000_0100;
    end
    for (int k = 0; k < PREFIX; k++, i++) begin
      cell_of[i] = -1; pos_of[i] = -1;
      do line[i] = 8'($urandom); while (zero_window(i));
      want[i] = line[i];
    end
    for (int c = 0; c < NCELL; c++) begin
      for (int k = 0; k < 53; k++, i++) begin
        cell_of[i] = c; pos_of[i] = k;
        if (k == 4) line[i] = hec4({line[i-4], line[i-3], line[i-2], line[i-1]});
        else do line[i] = 8'($urandom); while (zero_window(i));
        want[i] = (k >= 5) ? dscr.step(line[i], 1'b1) : line[i];
      end
      // damage the header after the fact; want[] keeps the intact header
      for (int k = 0; k < 5; k++)
        line[i-53+k] ^= errpat[c][8*(4-k) +: 8];
    end
  endtask

  initial begin
    repeat (LEN + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < LEN + LAT; n++) begin
      rx_data = (n < LEN) ? line[n] : 8'h5A;
      @(posedge clk);
      #1;
      if (n >= LAT) begin
        int d, c, p, nerr;
        d = n - LAT;
        c = cell_of[d];
        p = pos_of[d];
        nerr = (c >= 0) ? $countones(errpat[c]) : 0;
        check(rx_cell_sync_o == (p == 0), "CELL-SYNC on every header, nowhere else");
        check(rx_hdr_o == (p >= 0 && p < 5), "header mark");
        if (p == 0) check(rx_err_o == (nerr != 0), "ERR for damaged header");
        if (rx_herr_o) herrs++;
        if (ev_sync_o) begin syncs++; sync_cell = c; end
        if (p >= 0 && p < 5 && nerr <= 1) begin
          check(rx_data_o == want[d], "header octet restored");
          check(rx_corr_o == (errpat[c][8*(4-p) +: 8] != 0), "correction flag");
          if (rx_corr_o) corrections++;
        end
        if (p == 0 && nerr == 2) uncorrectable++;
        if (p >= 5) check(rx_payload_o, "payload mark");
        if (p >= 5 && rx_state_o == ST_SYNC) begin
          check(rx_data_o == want[d], "payload descrambled");
          payload_ok++;
        end
      end
      @(negedge clk);
    end
    check(syncs == 1 && sync_cell == 6, "SYNC reached once, at cell 6");
    check(corrections == 3, "three single-bit corrections");
    check(herrs >= PREFIX - 4, "HUNT misses through the prefix");
    check(uncorrectable == 1 && rx_state_o == ST_SYNC, "double error tolerated in SYNC");
    check(payload_ok > 600, "payload octets compared");
    $display("syncs %0d at cell %0d, corrections %0d, herr %0d, payload %0d",
             syncs, sync_cell, corrections, herrs, payload_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
