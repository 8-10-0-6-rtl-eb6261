// tb_mtr_decoder: exhaustive check of the codeword-to-byte decoder.
// Every one of the 256 codewords (group 00 built from the encoding rule,
// the other groups from tb/mtr_table2.hex) must decode to its byte. Words
// outside the code in groups 01, 10 and 11 must decode to m0 = c2, m1 = c7
// and zeros elsewhere.
module tb_mtr_decoder;
  import mtr_tb_pkg::*;
  logic [9:0] c;
  logic [7:0] m;
  int checks = 0, failures = 0;
  logic [9:0] table2 [256];

  mtr_decoder dut (.c(c), .m(m));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int others;
    others = 0;
    $readmemh("tb/mtr_table2.hex", table2);
    for (int v = 0; v < 256; v++) begin
      c = (v < 64) ? expected_g0(6'(v)) : table2[v];
      #1;
      checks++;
      if (m !== 8'(v)) begin
        failures++;
        $display("FAIL word %03h decoded to %02h, expected %02h", c, m, v);
      end
    end
    for (int w = 0; w < 1024; w++) begin
      bit known;
      logic [9:0] wv;
      wv = 10'(w);
      if (wv[7] == 1'b0 && wv[2] == 1'b0) continue;
      known = 1'b0;
      for (int j = 64; j < 256; j++) if (table2[j] == wv) known = 1'b1;
      if (known) continue;
      c = wv;
      #1;
      others++;
      checks++;
      if (m !== {wv[7], wv[2], 6'b0}) begin
        failures++;
        $display("FAIL non-codeword %03h decoded to %02h", c, m);
      end
    end
    $display("non-codewords tried: %0d", others);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
