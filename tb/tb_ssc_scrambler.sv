// Testbench for ssc_scrambler: a scrambler instance feeds a descrambler
// instance. The scrambler output is compared with a bit-serial x^43 + 1
// model, and the descrambler must return the original octets. Octets with
// en low (headers) must pass both unchanged. One cycle of latency each.
module tb_ssc_scrambler;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, en_q = 0;
  logic [7:0] din = '0, scr, dscr, din_q = '0, scr_exp = '0, din_qq = '0;
  int checks = 0, failures = 0, passed = 0;
  ssc_model ref_scr;

  ssc_scrambler #(.DESCRAMBLE(1'b0)) u_scr  (.clk, .rst_n, .en(en),   .din(din), .dout(scr));
  ssc_scrambler #(.DESCRAMBLE(1'b1)) u_dscr (.clk, .rst_n, .en(en_q), .din(scr), .dout(dscr));

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
    ref_scr = new(43);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      en  = ((n % 53) >= 5);
      din = 8'($urandom);
      @(posedge clk);
      // values the outputs must show after this edge
      din_qq  = din_q;
      din_q   = din;
      en_q   <= en;
      scr_exp = en ? ref_scr.step(din, 1'b0) : din;
      @(negedge clk);
      check(scr, scr_exp, "scrambled octet");
      if (!en) passed++;
      if (n > 0) check(dscr, din_qq, "descrambled octet");
    end
    $display("header octets passed: %0d", passed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
