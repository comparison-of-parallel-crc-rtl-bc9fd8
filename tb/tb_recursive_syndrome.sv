// Testbench for recursive_syndrome.
// Phase 1 (byte by byte): clear on the first octet, four plain updates,
// then sliding updates; from the fifth octet on the syndrome must equal the
// long-division syndrome of the last five octets, and dout the octet that
// entered five clocks earlier. Phase 2 (cell by cell): clear, four plain
// updates, then en low; the syndrome of that header must be held.
// Valid headers are inserted so the zero syndrome is reached as well.
// A second instance with an 8-octet window runs the sliding phase and is
// checked against the long-division syndrome of the last eight octets.
module tb_recursive_syndrome;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, clr = 0, sub = 0;
  logic [7:0] din = '0, syndrome, dout;
  logic [7:0] hist [$];
  int checks = 0, failures = 0, zeros = 0;

  recursive_syndrome dut (.clk, .rst_n, .en, .clr, .sub, .din, .syndrome, .dout);
  logic sub8 = 0;
  logic [7:0] syndrome8, dout8;
  recursive_syndrome #(.WIN(8)) dut8 (.clk, .rst_n, .en, .clr, .sub(sub8), .din,
                                      .syndrome(syndrome8), .dout(dout8));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] last5();
    int n = hist.size();
    return syn5(hist[n-5], hist[n-4], hist[n-3], hist[n-2], hist[n-1]);
  endfunction

  task automatic check(input logic [7:0] got, input logic [7:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %02h want %02h", what, got, want);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // phase 1: sliding window
    for (int n = 0; n < 2000; n++) begin
      en  = 1'b1;
      clr = (n == 0);
      sub = (n >= 5);
      sub8 = (n >= 8);
      din = 8'($urandom);
      if (n % 23 == 22) din = hec4({hist[$-3], hist[$-2], hist[$-1], hist[$]});
      @(posedge clk);
      hist.push_back(din);
      @(negedge clk);
      if (n >= 4) begin
        check(syndrome, last5(), "sliding syndrome");
        check(dout, hist[$-4], "delayed data");
        if (n >= 7) begin
          check(syndrome8, poly_rem({hist[$-7], hist[$-6], hist[$-5], hist[$-4],
                                     hist[$-3], hist[$-2], hist[$-1], hist[$]}, 64), "8-octet window");
          check(dout8, hist[$-7], "8-octet delay");
        end
        if (n % 23 == 22) begin
          zeros++;
          check(syndrome, 8'h00, "valid header");
        end
      end
    end
    // phase 2: cell by cell, 53-octet cells
    for (int c = 0; c < 20; c++) begin
      logic [7:0] h [5];
      for (int k = 0; k < 4; k++) h[k] = 8'($urandom);
      h[4] = (c % 2) ? hec4({h[0], h[1], h[2], h[3]}) : 8'($urandom);
      for (int k = 0; k < 53; k++) begin
        en  = (k < 5);
        clr = (k == 0);
        sub = 1'b0;
        din = (k < 5) ? h[k] : 8'($urandom);
        @(posedge clk);
        @(negedge clk);
        if (k >= 4) check(syndrome, syn5(h[0], h[1], h[2], h[3], h[4]), "cell syndrome");
      end
      if (c % 2) zeros++;
    end
    $display("zero syndromes checked: %0d", zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
