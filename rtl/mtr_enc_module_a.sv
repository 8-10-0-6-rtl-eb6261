// mtr_enc_module_a: encoder Module A of the rate 8/10 (0,6) MTR code.
//
// Purely combinational. From the low nibble m4..m7 of a byte in group 00
// (m0 m1 = 00) with m2 m3 in {00, 01, 10} it forms the five codeword bits
// a1..a5, which the encoder places at c4 c5 c6 c8 c9. The same module serves
// all three subgroups; they differ only in the prefix c0 c1 c3. Inputs
// 0000..1110 give fifteen distinct patterns; input 1111 is not used (the
// encoder sends a fixed special word for it), and the module's output for it
// is don't-care.
//
// The five sum-of-products equations are those of the published code. The
// third term of a3 is taken as m4 & ~m6: a ~m7 in that place would give
// inputs 1010 and 1100 (and 0101 and 1001) one shared pattern, which could
// not be decoded; with ~m6 the fifteen patterns are exactly the fifteen
// pattern bits of the code's words with prefix 001, 011 and 101.
//
// Interface: m4_7 = {m4, m5, m6, m7} (m4 in the MSB); a = {a1, ..., a5}.
module mtr_enc_module_a (
  input  logic [3:0] m4_7,
  output logic [4:0] a
);
  logic m4, m5, m6, m7;
  assign {m4, m5, m6, m7} = m4_7;

  always_comb begin
    a[4] = (m4 & m5) | (m4 & m6);                                  // a1
    a[3] = (~m4 & ~m5) | (~m4 & m6 & ~m7);                         // a2
    a[2] = (~m4 & m6) | (m4 & m5) | (m4 & ~m6);                    // a3
    a[1] = (~m5 & m7) | (~m6 & m7);                                // a4
    a[0] = (~m5 & ~m7) | (~m6 & ~m7);                              // a5
  end
endmodule
