// tb_mtr_encoder: exhaustive check of the byte-to-codeword encoder.
// For all 256 bytes: the word meets the run-length rules, c2 = m0 and
// c7 = m1, the word belongs to the code's set of 256 selected codewords
// (tb/mtr_table2.hex, grouped by m0 m1), group-00 words equal the encoding
// rule built from the Module A/B truth tables, words of the other groups
// equal the table entry of that byte, and no word is used twice.
module tb_mtr_encoder;
  import mtr_tb_pkg::*;
  logic [7:0] m;
  logic [9:0] c;
  int checks = 0, failures = 0;
  logic [9:0] table2 [256];

  mtr_encoder dut (.m(m), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL m=%02h c=%03h: %s", m, c, what);
    end
  endtask

  initial begin
    logic [9:0] out [256];
    $readmemh("tb/mtr_table2.hex", table2);
    for (int v = 0; v < 256; v++) begin
      bit in_group;
      m = 8'(v);
      #1;
      out[v] = c;
      check(valid_word(c), "run-length rules");
      check(c[7] == m[7] && c[2] == m[6], "c2 = m0, c7 = m1");
      in_group = 1'b0;
      for (int j = (v / 64) * 64; j < (v / 64) * 64 + 64; j++) if (table2[j] == c) in_group = 1'b1;
      check(in_group, "word is one of the selected codewords of its group");
      if (v < 64) check(c == expected_g0(6'(v)), "group-00 encoding rule");
      else        check(c == table2[v], "table entry");
    end
    for (int v = 0; v < 256; v++)
      for (int j = 0; j < v; j++)
        if (out[j] == out[v]) begin
          failures++;
          $display("FAIL bytes %02h and %02h share word %03h", j, v, out[v]);
        end
    checks++;
    // Hand-picked words of the encoding rule.
    m = 8'h0F; #1; check(c == 10'h228, "special word 228");
    m = 8'h1F; #1; check(c == 10'h229, "special word 229");
    m = 8'h2F; #1; check(c == 10'h22A, "special word 22A");
    m = 8'h00; #1; check(c == 10'h051, "00 -> 051");
    m = 8'h30; #1; check(c == 10'h11A, "30 -> 11A");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
