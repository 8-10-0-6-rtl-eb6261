// tb_mtr_enc_module_a: exhaustive check of encoder Module A.
// For m4..m7 = 0..14 the output must equal the Module A truth table, the
// fifteen patterns must be distinct, and each, behind every one of the three
// prefixes that use it, must form a word that meets the run-length rules.
module tb_mtr_enc_module_a;
  import mtr_tb_pkg::*;
  logic [3:0] m4_7;
  logic [4:0] a;
  int checks = 0, failures = 0;

  mtr_enc_module_a dut (.m4_7(m4_7), .a(a));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] seen [15];
    for (int v = 0; v < 15; v++) begin
      m4_7 = 4'(v);
      #1;
      seen[v] = a;
      checks++;
      if (a !== A_TABLE[v]) begin
        failures++;
        $display("FAIL m4..m7=%b a=%b expected %b", m4_7, a, A_TABLE[v]);
      end
      foreach (seen[j]) if (j < v && seen[j] == a) begin
        failures++;
        $display("FAIL m4..m7=%b repeats pattern of %0d", m4_7, j);
      end
      for (int p = 0; p < 3; p++) begin
        logic [2:0] pre;
        pre = (p == 0) ? 3'b001 : (p == 1) ? 3'b011 : 3'b101;
        checks++;
        if (!valid_word(place(pre, 1'b0, 1'b0, a))) begin
          failures++;
          $display("FAIL prefix %b pattern %b breaks the run-length rules", pre, a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
