// Testbench for gf_mul_xn: every input octet of the x^0, x^8, x^16, x^24,
// x^32 and x^40 networks is compared with the printed XOR networks (one
// mask of input bits per output bit) and with a bit-serial long division.
module tb_gf_mul_xn;
  import tb_ref_pkg::*;

  localparam int NN = 6;
  localparam int unsigned POW [NN] = '{0, 8, 16, 24, 32, 40};
  // masks of d_j feeding s7 .. s0
  localparam logic [7:0] NET [NN][8] = '{
    '{8'h80, 8'h40, 8'h20, 8'h10, 8'h08, 8'h04, 8'h02, 8'h01},
    '{8'hE0, 8'h70, 8'h38, 8'h1C, 8'h8E, 8'h47, 8'h43, 8'hC1},
    '{8'hA8, 8'h54, 8'hAA, 8'hD5, 8'h6A, 8'hB5, 8'hF2, 8'h51},
    '{8'h56, 8'h2B, 8'h15, 8'h0A, 8'h85, 8'h42, 8'hF7, 8'hAD},
    '{8'h68, 8'h34, 8'h9A, 8'hCD, 8'h66, 8'h33, 8'h71, 8'hD0},
    '{8'hC6, 8'h63, 8'h31, 8'h98, 8'h4C, 8'hA6, 8'h95, 8'h8C}
  };

  logic [7:0] d;
  logic [7:0] y [NN];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NN; k++) begin : g_dut
    gf_mul_xn #(.N(POW[k])) u_dut (.d(d), .y(y[k]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      d = 8'(v);
      #1;
      for (int k = 0; k < NN; k++) begin
        logic [7:0] e;
        for (int i = 0; i < 8; i++) e[7-i] = ^(d & NET[k][i]);
        checks++;
        if (y[k] !== e) begin
          failures++;
          if (failures < 10) $display("x^%0d d=%02h got %02h want %02h", POW[k], d, y[k], e);
        end
        checks++;
        if (y[k] !== poly_rem(64'(d) << POW[k], 8 + POW[k])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
