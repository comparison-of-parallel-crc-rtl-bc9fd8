// Testbench for hec_generator: cells of 53 octets with random headers and
// payloads. The fifth octet must become the HEC computed by long division
// (and the whole header must then divide by g(x)); all other octets pass
// unchanged with zero latency. A known vector: the header 00 00 00 01 has
// the CRC 07.
module tb_hec_generator;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, sop = 0;
  logic [7:0] din = '0, dout;
  logic sop_o, payload_o;
  int checks = 0, failures = 0;

  hec_generator dut (.clk, .rst_n, .sop, .din, .dout, .sop_o, .payload_o);

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] got, input logic [7:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %02h want %02h", what, got, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 60; c++) begin
      logic [31:0] h;
      logic [7:0] got_hec;
      h = (c == 0) ? 32'h0000_0001 : $urandom;
      for (int k = 0; k < 53; k++) begin
        sop = (k == 0) && (c < 2);        // sop only at the start
        din = (k < 4) ? h[31-8*k -: 8] : 8'($urandom);
        #1;
        check({7'h0, sop_o}, {7'h0, k == 0}, "sop_o");
        check({7'h0, payload_o}, {7'h0, k >= 5}, "payload_o");
        if (k == 4) begin
          got_hec = dout;
          check(dout, hec4(h), "HEC");
          if (c == 0) check(dout, 8'h07, "HEC of 00000001");
        end else begin
          check(dout, din, "pass-through");
        end
        @(negedge clk);
      end
      check(poly_rem({24'h0, h, got_hec}, 40), 8'h00, "header divisible");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
