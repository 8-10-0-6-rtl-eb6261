// mtr_codec: rate 8/10 (0,6) MTR encoder and decoder side by side.
//
// The write path maps each user byte to a 10-bit codeword (mtr_encoder); the
// read path maps each detected 10-bit word back to a byte (mtr_decoder). Both
// are purely combinational, with no clock or reset: the codeword sequence sent
// by concatenating the encoder's outputs, c0 of each word first, never holds
// three consecutive ones (three consecutive transitions in NRZI recording)
// nor more than six consecutive zeros. The two paths are independent so that a
// channel, serializer or detector can sit between them.
//
// Interface: enc_data (byte, MSB = m0) -> enc_code (codeword, MSB = c0);
// dec_code (codeword) -> dec_data (byte).
module mtr_codec
  import mtr_pkg::*;
(
  input  data_t enc_data,
  output code_t enc_code,
  input  code_t dec_code,
  output data_t dec_data
);
  mtr_encoder u_enc (.m(enc_data), .c(enc_code));
  mtr_decoder u_dec (.c(dec_code), .m(dec_data));
endmodule
