// mtr_dec_module_d: decoder module d of the rate 8/10 (0,6) MTR code, the
// inverse of encoder Module A.
//
// Purely combinational. From the codeword bits c4 c5 c6 c8 c9 of a group-00
// word whose prefix c0 c1 c3 is 001, 011 or 101 it recovers d1..d4 = m4..m7.
// Inputs that Module A never produces give don't-care outputs.
//
// The equations are those of the published code, with the second term of d2
// taken as ~c4 & ~c5 & ~c6: an uncomplemented c6 there would decode the
// patterns of m4..m7 = 0100, 0101, 1000 and 1001 wrongly; with ~c6 all
// fifteen Module A patterns decode to their inputs.
//
// Interface: cbits = {c4, c5, c6, c8, c9}; d = {d1, d2, d3, d4}.
module mtr_dec_module_d (
  input  logic [4:0] cbits,
  output logic [3:0] d
);
  logic c4, c5, c6, c8, c9;
  assign {c4, c5, c6, c8, c9} = cbits;

  always_comb begin
    d[3] = c4 | (~c5 & c6 & ~c8 & c9) | (~c5 & c6 & c8 & ~c9);         // d1
    d[2] = (~c8 & ~c9) | (~c4 & ~c5 & ~c6) | (c4 & ~c5 & c6);          // d2
    d[1] = (~c4 & c5 & c6) | (c4 & ~c5 & ~c6) | (c6 & ~c8 & ~c9);      // d3
    d[0] = c8 | (~c4 & ~c5 & ~c8 & ~c9);                               // d4
  end
endmodule
