// Testbench for error_pattern. For each of the 40 single-bit errors of a
// header the syndrome is formed by long division of the error word; the
// pattern must select exactly that bit in that octet and nothing in the
// other four. Every other nonzero syndrome and the zero syndrome must give
// no correction. Finally random headers with one flipped bit are corrected
// with the generated patterns and must come back intact.
module tb_error_pattern;
  import tb_ref_pkg::*;

  logic [7:0] syndrome;
  logic [2:0] byte_idx;
  logic [7:0] mask;
  logic       correctable;
  int checks = 0, failures = 0;
  bit single [256];

  error_pattern dut (.syndrome, .byte_idx, .mask, .correctable);

  task automatic check(input logic [7:0] got, input logic [7:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %02h want %02h", what, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 40; p++) begin
      logic [7:0] s;
      s = poly_rem(64'(1) << p, 40);
      single[s] = 1'b1;
      for (int k = 0; k < 5; k++) begin
        syndrome = s;
        byte_idx = 3'(k);
        #1;
        check(mask, (k == 4 - p / 8) ? 8'(1 << (p % 8)) : 8'h00, "single-bit mask");
        check({7'h0, correctable}, 8'h01, "correctable");
      end
    end
    for (int s = 0; s < 256; s++) begin
      if (single[s]) continue;
      for (int k = 0; k < 5; k++) begin
        syndrome = 8'(s);
        byte_idx = 3'(k);
        #1;
        check(mask, 8'h00, "no correction");
        check({7'h0, correctable}, 8'h00, "not correctable");
      end
    end
    for (int n = 0; n < 200; n++) begin
      logic [39:0] hdr, rx;
      logic [7:0] fixed;
      hdr[39:8] = $urandom;
      hdr[7:0]  = hec4(hdr[39:8]);
      rx = hdr ^ (40'(1) << $urandom_range(0, 39));
      syndrome = poly_rem(64'(rx), 40);
      for (int k = 0; k < 5; k++) begin
        byte_idx = 3'(k);
        #1;
        fixed = rx[8*(4-k) +: 8] ^ mask;
        check(fixed, hdr[8*(4-k) +: 8], "corrected octet");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
