// Reference models shared by the testbenches. They are written bit-serially
// and independently of the RTL: a long division by g(x) = x^8 + x^2 + x + 1
// and a one-bit-at-a-time x^43 + 1 self-synchronous scrambler.
package tb_ref_pkg;

  // Remainder of the nbits-bit polynomial v (MSB = highest power) by g(x),
  // computed by shifting the bits in one at a time, MSB first.
  function automatic logic [7:0] poly_rem(input logic [63:0] v, input int nbits);
    logic [8:0] r;
    r = '0;
    for (int i = nbits - 1; i >= 0; i--) begin
      r = {r[7:0], v[i]};
      if (r[8]) r = r ^ 9'h107;
    end
    return r[7:0];
  endfunction

  // Syndrome of a 5-octet window, b[0] the first octet received.
  function automatic logic [7:0] syn5(input logic [7:0] b0, b1, b2, b3, b4);
    return poly_rem({24'h0, b0, b1, b2, b3, b4}, 40);
  endfunction

  // HEC of a 4-octet header: R[x^8 * header].
  function automatic logic [7:0] hec4(input logic [31:0] h);
    return poly_rem({24'h0, h, 8'h00}, 40);
  endfunction

  // Bit-serial self-synchronous scrambler/descrambler x^tap + 1.
  class ssc_model;
    bit hist[$];
    int tap;
    function new(int t = 43);
      tap = t;
      hist.delete();
      for (int i = 0; i < tap; i++) hist.push_back(1'b0);
    endfunction
    // hist[0] is the oldest line bit kept (tap bits ago)
    function logic [7:0] step(logic [7:0] din, bit descramble);
      logic [7:0] res;
      for (int j = 7; j >= 0; j--) begin
        bit a, line;
        a = din[j] ^ hist[0];
        line = descramble ? din[j] : a;
        void'(hist.pop_front());
        hist.push_back(line);
        res[j] = a;
      end
      return res;
    endfunction
  endclass

endpackage
