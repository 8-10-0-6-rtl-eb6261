// mtr_tb_pkg: reference functions for the MTR code testbenches.
//
// valid_word() states the code's run-length rules directly on the ten bits,
// independently of the RTL: no run of three ones, no run of seven zeros, at
// most one leading and one trailing one, at most three leading and three
// trailing zeros. Exactly 282 ten-bit words pass it.
// a_pattern() and b_pattern() are the truth tables of encoder Modules A and B
// (c4 c5 c6 c8 c9 for each m4..m7), and expected_g0() builds a group-00
// codeword from them following the encoding rule.
package mtr_tb_pkg;

  localparam logic [4:0] A_TABLE [15] = '{
    5'b01001, 5'b01010, 5'b01101, 5'b01110, 5'b00001, 5'b00010, 5'b01100, 5'b00100,
    5'b00101, 5'b00110, 5'b10001, 5'b10010, 5'b10101, 5'b10110, 5'b10100};
  localparam logic [4:0] B_TABLE [16] = '{
    5'b01110, 5'b01101, 5'b01010, 5'b01100, 5'b00100, 5'b00101, 5'b00010, 5'b00110,
    5'b01001, 5'b11001, 5'b11010, 5'b10001, 5'b10100, 5'b10101, 5'b10010, 5'b10110};

  function automatic bit valid_word(logic [9:0] w);
    int run1, run0, lead1, lead0, trail1, trail0;
    run1 = 0; run0 = 0;
    for (int i = 9; i >= 0; i--) begin
      if (w[i]) begin run1++; run0 = 0; end else begin run0++; run1 = 0; end
      if (run1 > 2 || run0 > 6) return 1'b0;
    end
    lead1 = 0;  while (lead1 < 10 && w[9 - lead1]) lead1++;
    lead0 = 0;  while (lead0 < 10 && !w[9 - lead0]) lead0++;
    trail1 = 0; while (trail1 < 10 && w[trail1]) trail1++;
    trail0 = 0; while (trail0 < 10 && !w[trail0]) trail0++;
    return lead1 <= 1 && trail1 <= 1 && lead0 <= 3 && trail0 <= 3;
  endfunction

  // Place a 3-bit prefix (c0 c1 c3), the group bits and a 5-bit pattern
  // (c4 c5 c6 c8 c9) in codeword order.
  function automatic logic [9:0] place(logic [2:0] pre, logic m0, logic m1, logic [4:0] p);
    return {pre[2], pre[1], m0, pre[0], p[4], p[3], p[2], m1, p[1], p[0]};
  endfunction

  function automatic logic [9:0] expected_g0(logic [5:0] low);  // m2..m7
    logic [1:0] m23;
    logic [3:0] nib;
    m23 = low[5:4];
    nib = low[3:0];
    if (m23 == 2'b11) return place(3'b010, 1'b0, 1'b0, B_TABLE[nib]);
    if (nib == 4'hF)  return {2'b10, 1'b0, 4'b0101, 1'b0, m23};
    case (m23)
      2'b00:   return place(3'b001, 1'b0, 1'b0, A_TABLE[nib]);
      2'b01:   return place(3'b011, 1'b0, 1'b0, A_TABLE[nib]);
      default: return place(3'b101, 1'b0, 1'b0, A_TABLE[nib]);
    endcase
  endfunction

endpackage
