// tb_mtr_dec_module_d: exhaustive check of decoder module d.
// Each of the fifteen Module A patterns (c4 c5 c6 c8 c9) must decode to the
// m4..m7 that produced it.
module tb_mtr_dec_module_d;
  import mtr_tb_pkg::*;
  logic [4:0] cbits;
  logic [3:0] d;
  int checks = 0, failures = 0;

  mtr_dec_module_d dut (.cbits(cbits), .d(d));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 15; v++) begin
      cbits = A_TABLE[v];
      #1;
      checks++;
      if (d !== 4'(v)) begin
        failures++;
        $display("FAIL pattern %b decoded to %b, expected %b", cbits, d, 4'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
