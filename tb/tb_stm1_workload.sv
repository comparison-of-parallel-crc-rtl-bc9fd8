// Workload testbench: one millisecond of an STM-1 octet stream.
//
// At 155.52 Mb/s the octet clock is 19.44 MHz, so 1 ms is 19440 clocks,
// 366 complete 53-octet cells. The transmitter sends numbered cells
// back-to-back and the line is error free. For its first SKIP = 200
// clocks the receiver sees random octets instead of the line, so it joins
// the stream in the middle of a cell and has to hunt. Checked:
//  * sustained rate: the receiver accepts one octet every clock and, once in
//    SYNC, delivers one octet every clock, with a CELL-SYNC exactly every
//    53 clocks and no cell lost or duplicated (the header numbers count up);
//  * every payload octet delivered in SYNC equals the transmitter input;
//  * while hunting, the recursive generator's sliding syndrome equals the
//    Direct and Successive syndromes of the same five octets, every clock.
module tb_stm1_workload;
  import atm_hec_pkg::*;
  import tb_ref_pkg::*;

  localparam int NCYC  = 19440;
  localparam int NCELL = NCYC / 53 + 2;
  localparam int SKIP  = 200;

  logic clk = 0, rst_n = 0;
  logic tx_sop = 0, tx_sop_o;
  logic [7:0] tx_data = '0, tx_data_o, rx_data, rx_data_o;
  logic rx_cell_sync_o, rx_hdr_o, rx_payload_o, rx_corr_o;
  logic rx_syn_en_o, rx_err_detect_o, rx_err_o, rx_herr_o, rx_dec_en_o;
  logic ev_found_o, ev_lost_o, ev_sync_o;
  logic [7:0] direct_syn_o, successive_syn_o;
  delin_state_e rx_state_o;

  logic [7:0] payload [NCELL][53];
  logic [7:0] line_q [$];
  int checks = 0, failures = 0;
  int cells_sync = 0, last_cell = -1, last_sync_t = -1, cmp3 = 0, dup_or_gap = 0;
  int cur_cell = -1, hdr_pos = 0;
  logic [15:0] hdr_num;

  atm_tc_top dut (.*);

  // the line: transmitter output, replaced by random octets for SKIP clocks
  int         clk_n = 0;
  logic [7:0] noise = '0;
  always @(posedge clk) begin
    clk_n <= clk_n + 1;
    noise <= 8'($urandom);
  end
  assign rx_data = (clk_n < SKIP) ? noise : tx_data_o;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("t=%0t FAIL %s", $time, what);
    end
  endtask

  initial begin
    repeat (NCYC + SKIP + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter input: numbered cells, back to back
  initial begin
    for (int c = 0; c < NCELL; c++)
      for (int k = 5; k < 53; k++) payload[c][k] = 8'($urandom);
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < NCELL; c++)
      for (int k = 0; k < 53; k++) begin
        tx_sop = (k == 0) && (c == 0);
        case (k)
          0: tx_data = 8'h5C;
          1: tx_data = 8'(c >> 8);
          2: tx_data = 8'(c);
          3: tx_data = 8'h31;
          4: tx_data = 8'h00;
          default: tx_data = payload[c][k];
        endcase
        @(negedge clk);
      end
  end

  initial begin
    int t;
    repeat (3) @(posedge clk);
    for (t = 0; t < NCYC; t++) begin
      @(posedge clk);
      #1;
      // three algorithms agree while hunting (the recursive register slides)
      if (rx_state_o == ST_HUNT && dut.u_rx.u_ctrl.state == ST_HUNT &&
          dut.u_rx.u_ctrl.fill_q == 3'(HDR_BYTES)) begin
        check(dut.u_rx.syndrome == direct_syn_o && direct_syn_o == successive_syn_o,
              "Recursive = Direct = Successive");
        cmp3++;
      end
      if (rx_state_o == ST_SYNC) begin
        if (rx_cell_sync_o) begin
          if (last_sync_t >= 0) check(t - last_sync_t == 53, "CELL-SYNC every 53 clocks");
          last_sync_t = t;
          hdr_pos = 0;
          cells_sync++;
        end
        if (last_sync_t >= 0) begin
          if (hdr_pos == 1) hdr_num[15:8] = rx_data_o;
          if (hdr_pos == 2) begin
            hdr_num[7:0] = rx_data_o;
            cur_cell = int'(hdr_num);
            if (last_cell >= 0 && cur_cell != last_cell + 1) dup_or_gap++;
            last_cell = cur_cell;
          end
          if (hdr_pos >= 5 && cur_cell >= 0) begin
            check(rx_payload_o && rx_data_o == payload[cur_cell][hdr_pos], "payload octet");
          end
          hdr_pos++;
        end
      end
    end
    check(cells_sync > 350, "cells delivered in SYNC");
    check(dup_or_gap == 0, "no cell lost or repeated");
    check(cmp3 > 5, "algorithms compared while hunting");
    $display("clocks %0d, cells delivered in SYNC %0d, last cell %0d, three-way compares %0d",
             NCYC, cells_sync, last_cell, cmp3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
