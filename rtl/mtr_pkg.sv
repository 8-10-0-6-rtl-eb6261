// mtr_pkg: types, constants and the codeword table shared by the rate 8/10
// (0,6) MTR encoder and decoder.
//
// A user byte m0..m7 is held in a data_t with m0 in the most significant bit.
// A codeword c0..c9 is held in a code_t with c0 in the most significant bit;
// c0 is the first bit sent on the channel. With this convention the codewords
// read the same as the 3-digit hexadecimal numbers used for them (for example
// 10'h228 = c0..c9 = 1000101000).
//
// The code's rule (is_valid_word): no run of three ones inside a word (the
// MTR constraint, in NRZI terms no three consecutive transitions), no run of
// seven zeros (k = 6), at most one leading and one trailing one and at most
// three leading and three trailing zeros, so that any concatenation of
// codewords keeps both limits. 282 ten-bit words satisfy it; 256 of them form
// the code.
//
// UPPER_TABLE holds the 192 codewords of groups m0 m1 = 01, 10 and 11, entry
// i being the word of byte 64 + i. It is computed at elaboration, not stored:
// the table is the concatenation of 14 segments, and each segment is the list,
// in ascending order, of the valid words that match a fixed bit pattern
// (SEGMENTS, a mask and a value) and are not among the nine words of
// UNUSED_WORDS, which the code leaves out. The segments and the set of words
// they yield are those of the published code; that byte 64 + i gets the i-th
// word is this design's choice (see mtr_encoder).
package mtr_pkg;

  typedef logic [7:0] data_t;
  typedef logic [9:0] code_t;

  // Run-length limits of the code.
  localparam int unsigned MAX_ONES  = 2;  // MTR: at most two consecutive transitions
  localparam int unsigned MAX_ZEROS = 6;  // k = 6

  // Fixed bits of the group-00 words with m4..m7 = 1111:
  // c0 c1 c3 c4 c5 c6 = 1 0 0 1 0 1, and c8 c9 repeat m2 m3.
  localparam logic [5:0] G0_SPECIAL_PREFIX = 6'b100101;

  // ---------------------------------------------------------------------
  // Codeword table of groups 01, 10 and 11.
  // ---------------------------------------------------------------------
  localparam int unsigned UPPER_WORDS = 192;
  localparam int unsigned N_SEGMENTS  = 14;
  localparam int unsigned N_UNUSED    = 9;

  typedef struct packed {
    code_t mask;   // bits that are fixed
    code_t value;  // their values
  } segment_t;

  typedef code_t upper_table_t [UPPER_WORDS];

  // In c0..c9 order, x = free. Sixteen words per value of m2 m3.
  localparam segment_t SEGMENTS [N_SEGMENTS] = '{
    // group 01 (c2 = 0, c7 = 1)
    '{10'h3F4, 10'h064},  // 000110x1xx \
    '{10'h3F4, 10'h164},  // 010110x1xx  > m2 m3 = 00
    '{10'h3E4, 10'h144},  // 01010xx1xx /
    '{10'h3C4, 10'h104},  // 0100xxx1xx   m2 m3 = 01
    '{10'h3C4, 10'h204},  // 1000xxx1xx   m2 m3 = 10
    '{10'h1E4, 10'h044},  // x0010xx1xx   m2 m3 = 11
    // group 10 (c2 = 1, c7 = 0)
    '{10'h3C4, 10'h080},  // 0010xxx0xx
    '{10'h3C4, 10'h180},  // 0110xxx0xx
    '{10'h3C4, 10'h280},  // 1010xxx0xx
    '{10'h1E4, 10'h0C0},  // x0110xx0xx
    // group 11 (c2 = 1, c7 = 1)
    '{10'h3C4, 10'h084},  // 0010xxx1xx
    '{10'h3C4, 10'h184},  // 0110xxx1xx
    '{10'h3C4, 10'h284},  // 1010xxx1xx
    '{10'h1E4, 10'h0C4}   // x0110xx1xx
  };

  localparam code_t UNUSED_WORDS [N_UNUSED] = '{
    10'h06D, 10'h16D, 10'h09A, 10'h19A, 10'h29A, 10'h0DA, 10'h2D8, 10'h2D9, 10'h2DA
  };

  function automatic bit is_valid_word(code_t w);
    bit ok;
    ok = !(w[9] && w[8]) && !(w[1] && w[0]) && (w[9:6] != 4'b0000) && (w[3:0] != 4'b0000);
    for (int i = 0; i <= 7; i++) if (w[i] && w[i+1] && w[i+2]) ok = 1'b0;
    for (int i = 0; i <= 3; i++) if (w[i+:7] == 7'b0000000) ok = 1'b0;
    return ok;
  endfunction

  function automatic bit is_unused(code_t w);
    bit hit;
    hit = 1'b0;
    for (int i = 0; i < N_UNUSED; i++) if (UNUSED_WORDS[i] == w) hit = 1'b1;
    return hit;
  endfunction

  function automatic upper_table_t build_upper_table();
    upper_table_t t;
    int unsigned  n;
    n = 0;
    for (int i = 0; i < UPPER_WORDS; i++) t[i] = '0;
    for (int s = 0; s < N_SEGMENTS; s++) begin
      for (int w = 0; w < 1024; w++) begin
        if ((code_t'(w) & SEGMENTS[s].mask) == SEGMENTS[s].value &&
            is_valid_word(code_t'(w)) && !is_unused(code_t'(w)) && n < UPPER_WORDS) begin
          t[n] = code_t'(w);
          n++;
        end
      end
    end
    return t;
  endfunction

  localparam upper_table_t UPPER_TABLE = build_upper_table();

endpackage
