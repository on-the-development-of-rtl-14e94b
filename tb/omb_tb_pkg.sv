// omb_tb_pkg: reference models shared by the testbenches.
//
// crc_ref computes the packet CRC independently of the design: it folds the
// words in as bytes (high byte first) with the byte-wise form of the
// CRC-16-CCITT shift register (x^16+x^12+x^5+1, start value 0xFFFF), which
// gives the same result as the design's word-wise, bit-serial fold.
package omb_tb_pkg;

  function automatic logic [15:0] crc_ref(input logic [15:0] w[$]);
    logic [15:0] c;
    logic [7:0]  b;
    c = 16'hFFFF;
    foreach (w[k]) begin
      for (int h = 1; h >= 0; h--) begin
        b = (h == 1) ? w[k][15:8] : w[k][7:0];
        c = c ^ {b, 8'h00};
        repeat (8) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
      end
    end
    return c;
  endfunction

endpackage
