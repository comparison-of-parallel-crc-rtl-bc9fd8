// Testbench for cdsb_tx: 40 cells with random headers and payloads. One
// clock after input, the output must carry the header with its HEC in the
// fifth octet (long-division reference) and the payload scrambled by a
// bit-serial x^43 + 1 model that sees payload octets only; tx_sop_o must
// mark the first header octet.
module tb_cdsb_tx;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, tx_sop = 0, tx_sop_o;
  logic [7:0] tx_data = '0, tx_data_o;
  logic [7:0] exp_q;
  logic       exp_sop_q;
  int checks = 0, failures = 0;
  ssc_model scr;

  cdsb_tx dut (.clk, .rst_n, .tx_sop, .tx_data, .tx_sop_o, .tx_data_o);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("t=%0t FAIL %s", $time, what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    scr = new(43);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 40; c++) begin
      logic [31:0] h;
      h = $urandom;
      for (int k = 0; k < 53; k++) begin
        tx_sop  = (k == 0);
        tx_data = (k < 4) ? h[31-8*k -: 8] : 8'($urandom);
        if (k < 4)       exp_q = tx_data;
        else if (k == 4) exp_q = hec4(h);
        else             exp_q = scr.step(tx_data, 1'b0);
        exp_sop_q = (k == 0);
        @(posedge clk);
        #1;
        check(tx_data_o == exp_q, "output octet");
        check(tx_sop_o == exp_sop_q, "tx_sop_o");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
