// mtr_upper_table_dec: reverse lookup in the codeword table of groups 01, 10
// and 11 of the rate 8/10 (0,6) MTR code.
//
// Purely combinational. The received word is compared with all 192 entries
// of the constant table UPPER_TABLE (mtr_pkg; entry i = codeword of byte
// 64 + i), the same table mtr_upper_table_enc reads. hit is set when one
// matches and m is then that byte. Since the entries are distinct at most one
// comparator fires, so the matching indices are simply ORed together. For a
// word not in the table hit is 0 and m is 0.
//
// Interface: c is the received word, c0 in the MSB; m is the byte, hit the
// match flag.
module mtr_upper_table_dec
  import mtr_pkg::*;
(
  input  code_t c,
  output data_t m,
  output logic  hit
);
  always_comb begin
    m   = '0;
    hit = 1'b0;
    for (int unsigned i = 0; i < UPPER_WORDS; i++) begin
      if (UPPER_TABLE[i] == c) begin
        m   = m | data_t'(i + 64);
        hit = 1'b1;
      end
    end
  end
endmodule
