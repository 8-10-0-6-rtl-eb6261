// mtr_dec_module_h: decoder module h of the rate 8/10 (0,6) MTR code, the
// inverse of encoder Module B.
//
// Purely combinational. From the codeword bits c4 c5 c6 c8 c9 of a group-00
// word with prefix c0 c1 c3 = 010 it recovers h1..h4 = m4..m7. Inputs that
// Module B never produces give don't-care outputs.
//
// h1 and h2 are the published equations. For h3 and h4 this design keeps the
// published terms that decode Module B correctly and adds its own: the last
// term of both is c5 & ~c8 & ~c9 (true, among Module B patterns, only for
// 01100, the word of m4..m7 = 0011), and h4 uses c6 & c9 where a ~c6 & c9
// term would also fire for pattern 01001. With that, all sixteen Module B
// patterns decode to their inputs.
//
// Interface: cbits = {c4, c5, c6, c8, c9}; h = {h1, h2, h3, h4}.
module mtr_dec_module_h (
  input  logic [4:0] cbits,
  output logic [3:0] h
);
  logic c4, c5, c6, c8, c9;
  assign {c4, c5, c6, c8, c9} = cbits;

  always_comb begin
    h[3] = c4 | (c5 & ~c6 & ~c8);                                              // h1
    h[2] = (~c5 & c6) | (~c5 & c8);                                            // h2
    h[1] = (~c5 & c8) | (~c6 & c8) | (~c5 & ~c6 & ~c8) | (c5 & ~c8 & ~c9);     // h3
    h[0] = (c4 & c9) | (c6 & c9) | (c4 & c6 & c8) | (~c4 & ~c5 & c6 & c8)
         | (c5 & ~c8 & ~c9);                                                   // h4
  end
endmodule
