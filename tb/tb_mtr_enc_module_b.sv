// tb_mtr_enc_module_b: exhaustive check of encoder Module B.
// For all sixteen m4..m7 the output must equal the Module B truth table, the
// patterns must be distinct, and each, behind the prefix c0 c1 c3 = 010,
// must form a word that meets the run-length rules.
module tb_mtr_enc_module_b;
  import mtr_tb_pkg::*;
  logic [3:0] m4_7;
  logic [4:0] b;
  int checks = 0, failures = 0;

  mtr_enc_module_b dut (.m4_7(m4_7), .b(b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] seen [16];
    for (int v = 0; v < 16; v++) begin
      m4_7 = 4'(v);
      #1;
      seen[v] = b;
      checks++;
      if (b !== B_TABLE[v]) begin
        failures++;
        $display("FAIL m4..m7=%b b=%b expected %b", m4_7, b, B_TABLE[v]);
      end
      foreach (seen[j]) if (j < v && seen[j] == b) begin
        failures++;
        $display("FAIL m4..m7=%b repeats pattern of %0d", m4_7, j);
      end
      for (int p = 0; p < 1; p++) begin
        logic [2:0] pre;
        pre = 3'b010;
        checks++;
        if (!valid_word(place(pre, 1'b0, 1'b0, b))) begin
          failures++;
          $display("FAIL prefix %b pattern %b breaks the run-length rules", pre, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
