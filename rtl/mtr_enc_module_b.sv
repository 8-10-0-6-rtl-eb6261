// mtr_enc_module_b: encoder Module B of the rate 8/10 (0,6) MTR code.
//
// Purely combinational. From m4..m7 of a byte with m0 m1 m2 m3 = 0011 it
// forms the five codeword bits b1..b5, which the encoder places at
// c4 c5 c6 c8 c9 behind the prefix c0 c1 c3 = 010. All sixteen inputs give
// distinct patterns.
//
// The five sum-of-products equations are those of the published code. The
// third term of b4 is taken as ~m4 & ~m5 & ~m7: an uncomplemented m5 there
// would make inputs 0000/0011 and 0100/0111 collide; with ~m5 the sixteen
// patterns are exactly those of the code's words 102..132 (hex), with
// 0000 -> 01110 and 0100 -> 00100.
//
// Interface: m4_7 = {m4, m5, m6, m7}; b = {b1, ..., b5}.
module mtr_enc_module_b (
  input  logic [3:0] m4_7,
  output logic [4:0] b
);
  logic m4, m5, m6, m7;
  assign {m4, m5, m6, m7} = m4_7;

  always_comb begin
    b[4] = (m4 & m5) | (m4 & m6) | (m4 & m7);                                // b1
    b[3] = (~m4 & ~m5) | (~m5 & ~m6) | (~m5 & ~m7);                          // b2
    b[2] = (~m4 & ~m6) | (~m4 & m7) | (m5 & ~m6) | (m5 & m7);                // b3
    b[1] = (m5 & m6) | (m6 & ~m7) | (~m4 & ~m5 & ~m7);                       // b4
    b[0] = (~m6 & m7) | (m4 & ~m5 & ~m6) | (m4 & ~m5 & m7);                  // b5
  end
endmodule
