// mtr_encoder: byte-to-codeword encoder of the rate 8/10 (0,6) MTR code.
//
// Purely combinational: the codeword follows the byte after gate delays only,
// so one byte is encoded per cycle of whatever clock drives it.
//
// How it works. The two most significant data bits are copied into the
// codeword, c2 = m0 and c7 = m1, which splits the 256 codewords into four
// groups of 64 that share those two bits. In group m0 m1 = 00 the next two
// bits m2 m3 choose a prefix c0 c1 c3 and the low nibble m4..m7 goes through
// a small pattern module that supplies c4 c5 c6 c8 c9:
//
//   m2 m3 = 00 : c0 c1 c3 = 001, pattern from Module A
//   m2 m3 = 01 : c0 c1 c3 = 011, pattern from Module A
//   m2 m3 = 10 : c0 c1 c3 = 101, pattern from Module A
//   m2 m3 = 11 : c0 c1 c3 = 010, pattern from Module B
//
// Module A has fifteen patterns, so in the first three rows m4..m7 = 1111 is
// sent instead as the special word c0 c1 c3 c4 c5 c6 = 100101 with
// c8 c9 = m2 m3 (codewords 228, 229 and 22A in hex). All of this follows the
// published encoding rule.
//
// Groups 01, 10 and 11 are taken from the published set of selected
// codewords through a 192-entry table (mtr_upper_table_enc). The published
// gate-level rule for these groups (shared modules X and Y) is not
// reproduced here; within each of these groups the assignment of bytes to
// codewords is this design's choice, the order in which the published list
// gives the codewords. Because c2 and c7 of every table entry equal m0 and
// m1, the group split above holds for all 256 bytes.
//
// Interface: m = m0..m7 with m0 in the MSB; c = c0..c9 with c0 in the MSB
// (c0 is sent first).
module mtr_encoder
  import mtr_pkg::*;
(
  input  data_t m,
  output code_t c
);
  logic m0, m1, m2, m3;
  assign {m0, m1, m2, m3} = m[7:4];

  logic [4:0] a, b;
  code_t      upper_c;

  mtr_enc_module_a u_mod_a (.m4_7(m[3:0]), .a(a));
  mtr_enc_module_b u_mod_b (.m4_7(m[3:0]), .b(b));
  mtr_upper_table_enc u_upper (.m(m), .c(upper_c));

  // Group-00 codeword, assembled bit by bit in the codeword order c0..c9.
  code_t g0_c;
  always_comb begin
    logic [2:0] prefix;   // c0 c1 c3
    logic [4:0] pattern;  // c4 c5 c6 c8 c9
    unique case ({m2, m3})
      2'b00:   prefix = 3'b001;
      2'b01:   prefix = 3'b011;
      2'b10:   prefix = 3'b101;
      default: prefix = 3'b010;
    endcase
    pattern = ({m2, m3} == 2'b11) ? b : a;
    g0_c = {prefix[2], prefix[1], m0, prefix[0], pattern[4:2], m1, pattern[1:0]};
    if ({m2, m3} != 2'b11 && m[3:0] == 4'b1111) begin
      g0_c = {G0_SPECIAL_PREFIX[5:4], m0, G0_SPECIAL_PREFIX[3:0], m1, m2, m3};
    end
  end

  assign c = ({m0, m1} == 2'b00) ? g0_c : upper_c;
endmodule
