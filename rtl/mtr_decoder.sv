// mtr_decoder: codeword-to-byte decoder of the rate 8/10 (0,6) MTR code.
//
// Purely combinational, the exact inverse of mtr_encoder on the 256
// codewords of the code.
//
// How it works. m0 = c2 and m1 = c7 are read straight from the word. In
// group c2 c7 = 00 the word is classified by its fixed bits:
//
//   c0 c1 c3 c4 c5 c6 = 100101 : special word, m2 m3 = c8 c9, m4..m7 = 1111
//   c0 c1 c3 = 001              : m2 m3 = 00, m4..m7 from module d
//   c0 c1 c3 = 011              : m2 m3 = 01, m4..m7 from module d
//   c0 c1 c3 = 101              : m2 m3 = 10, m4..m7 from module d
//   c0 c1 c3 = 010              : m2 m3 = 11, m4..m7 from module h
//
// where modules d and h invert the encoder's Modules A and B from the five
// bits c4 c5 c6 c8 c9. This follows the published decoding rule. Words of
// groups 01, 10 and 11 are looked up in the same codeword table the encoder
// uses (mtr_upper_table_dec); the published shared modules u, s, r and v for
// those groups are not reproduced.
//
// A word that is not a codeword is this design's choice: it decodes to
// m0 = c2, m1 = c7 and m2..m7 = 000000, unless its group-00 prefix makes it
// look like a codeword, in which case the d or h output is passed on. No
// error flag is produced.
//
// Interface: c = c0..c9 with c0 in the MSB; m = m0..m7 with m0 in the MSB.
module mtr_decoder
  import mtr_pkg::*;
(
  input  code_t c,
  output data_t m
);
  logic c0, c1, c2, c3, c4, c5, c6, c7, c8, c9;
  assign {c0, c1, c2, c3, c4, c5, c6, c7, c8, c9} = c;

  logic [3:0] d, h;
  data_t      upper_m;
  logic       upper_hit;

  mtr_dec_module_d u_mod_d (.cbits({c4, c5, c6, c8, c9}), .d(d));
  mtr_dec_module_h u_mod_h (.cbits({c4, c5, c6, c8, c9}), .h(h));
  mtr_upper_table_dec u_upper (.c(c), .m(upper_m), .hit(upper_hit));

  always_comb begin
    m = {c2, c7, 6'b000000};
    if ({c2, c7} == 2'b00) begin
      if ({c0, c1, c3, c4, c5, c6} == G0_SPECIAL_PREFIX) begin
        m[5:0] = {c8, c9, 4'b1111};
      end else begin
        unique case ({c0, c1, c3})
          3'b001:  m[5:0] = {2'b00, d};
          3'b011:  m[5:0] = {2'b01, d};
          3'b101:  m[5:0] = {2'b10, d};
          3'b010:  m[5:0] = {2'b11, h};
          default: m[5:0] = 6'b000000;
        endcase
      end
    end else if (upper_hit) begin
      m = upper_m;  // its m0 m1 equal c2 c7 by construction of the table
    end
  end
endmodule
