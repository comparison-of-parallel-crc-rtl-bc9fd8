// Testbench for direct_syndrome: random octets (with random enable gaps)
// are fed in and the output is compared every cycle with the long-division
// syndrome of the last five accepted octets. Every 17th octet completes a
// valid header (four random octets followed by their HEC), which must give
// a zero syndrome. A second instance with an 8-octet window is checked
// against the long-division syndrome of the last eight octets.
module tb_direct_syndrome;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] din = '0, syndrome;
  logic [7:0] win [5];
  logic [7:0] syndrome8;
  logic [63:0] win8 = '0;
  int checks = 0, failures = 0, zeros = 0;

  direct_syndrome dut (.clk, .rst_n, .en, .din, .syndrome);
  direct_syndrome #(.WIN(8)) dut8 (.clk, .rst_n, .en, .din, .syndrome(syndrome8));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) win[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      en  = ($urandom_range(0, 7) != 0);
      din = 8'($urandom);
      if (n % 17 == 16) begin
        din = hec4({win[1], win[2], win[3], win[4]});
        en  = 1'b1;
      end
      @(posedge clk);
      if (en) begin
        for (int i = 0; i < 4; i++) win[i] = win[i+1];
        win[4] = din;
        win8 = {win8[55:0], din};
      end
      @(negedge clk);
      checks++;
      if (syndrome !== syn5(win[0], win[1], win[2], win[3], win[4])) begin
        failures++;
        if (failures < 10) $display("n=%0d got %02h want %02h", n, syndrome,
                                    syn5(win[0], win[1], win[2], win[3], win[4]));
      end
      checks++;
      if (syndrome8 !== poly_rem(win8, 64)) failures++;
      if (n % 17 == 16) begin
        checks++;
        zeros++;
        if (syndrome !== 8'h00) failures++;
      end
    end
    $display("valid headers seen: %0d", zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
