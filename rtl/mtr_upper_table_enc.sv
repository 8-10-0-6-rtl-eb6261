// mtr_upper_table_enc: codeword table of groups 01, 10 and 11 of the rate
// 8/10 (0,6) MTR code, read by byte value.
//
// Purely combinational read of the 192-entry constant table UPPER_TABLE from
// mtr_pkg (computed at elaboration, see there); entry i is the codeword of
// byte 64 + i. The entries run through group m0 m1 = 01 (c2 = 0, c7 = 1),
// then 10 (c2 = 1, c7 = 0), then 11 (c2 = 1, c7 = 1), sixteen words per
// value of m2 m3, so c2 = m0 and c7 = m1 hold for every entry. Synthesis
// turns the constant array into logic.
//
// Interface: m is the byte; for m0 m1 = 00 (not in the table) c is 0.
// c is the codeword, c0 in the MSB.
module mtr_upper_table_enc
  import mtr_pkg::*;
(
  input  data_t m,
  output code_t c
);
  logic [7:0] addr;
  assign addr = m - 8'd64;

  always_comb begin
    c = '0;
    for (int unsigned i = 0; i < UPPER_WORDS; i++) begin
      if (addr == 8'(i)) c = UPPER_TABLE[i];
    end
  end
endmodule
