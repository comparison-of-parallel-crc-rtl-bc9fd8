// Testbench for delineation_ctrl, driven through a recursive_syndrome.
//
// The octet stream is a random prefix followed by 53-octet cells. Every
// random octet is redrawn if it would close a five-octet window with zero
// syndrome, so the only zero windows are genuine headers and the expected
// behaviour is fully known. Headers are made bad by flipping a bit of the
// HEC. Script (cell numbers): 0..7 good, 8..13 bad, 14 good, 15..21 bad,
// 22 good, 23 bad, 24..33 good. Expected:
//   found (HUNT->PRESYNC) at cells 0, 22, 24;  SYNC at cells 6 and 30;
//   lost from SYNC at cell 21 (seventh bad header in a row, the six before
//   do not drop sync); lost from PRESYNC at cell 23.
// Each cycle also checks: CELL-SYNC only with a header octet at the delay
// line output, ERR/HERR against the header flags, SYN-EN five cycles per
// cell in cell mode, the correction index sequence and the payload marks.
module tb_delineation_ctrl;
  import atm_hec_pkg::*;
  import tb_ref_pkg::*;

  localparam int PREFIX = 97;
  localparam int NCELL  = 34;
  localparam int LEN    = PREFIX + NCELL * 53 + 20;

  logic clk = 0, rst_n = 0;
  logic [7:0] din = '0, syndrome, dout;
  logic syn_en, syn_clr, syn_sub, err_detect, err, herr, dec_en, cell_sync;
  logic corr_en, scr_en, ev_found, ev_lost, ev_sync;
  logic [7:0] corr_syn;
  logic [2:0] corr_idx;
  delin_state_e state;

  logic [7:0] stream [LEN];
  int         cell_of [LEN];   // -1 outside cells
  int         pos_of  [LEN];
  bit         bad [NCELL];
  int checks = 0, failures = 0;
  int found_cells[$], sync_cells[$], lost_cells[$];
  int herr_cycles = 0, syn_en_cnt = 0, cells_in_sync = 0;

  recursive_syndrome u_syn (.clk, .rst_n, .en(syn_en), .clr(syn_clr), .sub(syn_sub),
                            .din, .syndrome, .dout);
  delineation_ctrl dut (.clk, .rst_n, .syndrome, .syn_en, .syn_clr, .syn_sub,
                        .err_detect, .err, .herr, .dec_en, .cell_sync, .state,
                        .corr_en, .corr_syn, .corr_idx, .scr_en,
                        .ev_found, .ev_lost, .ev_sync);

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
    return syn5(stream[i-4], stream[i-3], stream[i-2], stream[i-1], stream[i]) == 8'h00;
  endfunction

  task automatic build();
    int i = 0;
    for (int c = 0; c < NCELL; c++)
      bad[c] = (c >= 8 && c <= 13) || (c >= 15 && c <= 21) || (c == 23);
    for (int k = 0; k < PREFIX; k++) begin
      cell_of[i] = -1; pos_of[i] = -1;
      do stream[i] = 8'($urandom); while (zero_window(i));
      i++;
    end
    for (int c = 0; c < NCELL; c++) begin
      for (int k = 0; k < 53; k++) begin
        cell_of[i] = c; pos_of[i] = k;
        if (k == 4) begin
          stream[i] = hec4({stream[i-4], stream[i-3], stream[i-2], stream[i-1]}) ^ (bad[c] ? 8'h01 : 8'h00);
        end else begin
          do stream[i] = 8'($urandom); while (zero_window(i));
        end
        i++;
      end
    end
    for (; i < LEN; i++) begin
      cell_of[i] = -1; pos_of[i] = -1;
      do stream[i] = 8'($urandom); while (zero_window(i));
    end
  endtask

  initial begin
    repeat (LEN + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx;
    delin_state_e st_prev;
    build();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    exp_idx = 9;
    for (int m = 0; m < LEN; m++) begin
      din = stream[m];
      @(posedge clk);
      #1;
      // byte at the delay line output: index m-4
      if (m >= 4 && m - 4 < PREFIX + NCELL * 53) begin
        int d;
        bit is_h1;
        d = m - 4;
        is_h1 = (pos_of[d] == 0);
        check(dout == stream[d], "delay line");
        if (cell_sync) begin
          check(is_h1, "CELL-SYNC on a header octet");
          if (is_h1 && state != ST_HUNT) cells_in_sync++;
        end
        if (err_detect) begin
          check(err == (!is_h1 || bad[cell_of[d]]), "ERR value");
          check(herr == (err && state == ST_HUNT), "HERR value");
          if (herr) herr_cycles++;
        end
        if (state != ST_HUNT) begin
          check(err_detect == is_h1, "cell-by-cell check once per cell");
          if (syn_en && !ev_lost) syn_en_cnt++;
          check(scr_en == (pos_of[d] >= 5 && !ev_lost), "payload mark");
          if (pos_of[d] >= 0 && pos_of[d] < 5)
            check(corr_en && corr_idx == 3'(pos_of[d]), "correction index");
        end else begin
          check(err_detect || m < 8, "byte-by-byte check every octet");
          check(!scr_en, "no descrambling in HUNT");
        end
        if (ev_found) found_cells.push_back(cell_of[d]);
        if (ev_sync)  sync_cells.push_back(cell_of[d]);
        if (ev_lost)  lost_cells.push_back(cell_of[d]);
      end
      @(negedge clk);
    end
    check(found_cells.size() == 3 && found_cells[0] == 0 && found_cells[1] == 22 &&
          found_cells[2] == 24, "found at cells 0, 22, 24");
    check(sync_cells.size() == 2 && sync_cells[0] == 6 && sync_cells[1] == 30,
          "SYNC reached at cells 6 and 30");
    check(lost_cells.size() == 2 && lost_cells[0] == 21 && lost_cells[1] == 23,
          "sync lost at cells 21 and 23");
    check(herr_cycles > PREFIX, "HUNT misses counted");
    $display("found %p sync %p lost %p herr %0d cell checks %0d", found_cells, sync_cells,
             lost_cells, herr_cycles, cells_in_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
