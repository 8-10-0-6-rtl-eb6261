// tb_mtr_codec: end-to-end test of the MTR encoder/decoder pair.
//
// Phase 1 encodes every ordered pair of bytes (65536 pairs) and checks the
// 20-bit concatenation against the run-length rules: no three consecutive
// ones and no seven consecutive zeros, across the word boundary too.
// Phase 2 sends a pseudo-random byte stream through the encoder, tracks the
// run lengths of the resulting serial bit stream continuously, loops each
// codeword back into the decoder and compares the byte.
// Each path of the design is counted and must occur: Module A, Module B,
// special word and table words in the encoder; module d, module h, special
// word and table lookup in the decoder; and the stream must actually reach
// the run limits (a run of two ones and a run of six zeros).
module tb_mtr_codec;
  import mtr_pkg::*;
  localparam int STREAM_BYTES = 200000;

  data_t enc_data, dec_data;
  code_t enc_code, dec_code;
  int checks = 0, failures = 0;

  mtr_codec dut (.enc_data(enc_data), .enc_code(enc_code),
                 .dec_code(dec_code), .dec_data(dec_data));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run-length state of the serial stream.
  int run1, run0, max1_seen, max0_seen;
  function automatic void push_bit(bit b);
    if (b) begin run1++; run0 = 0; end else begin run0++; run1 = 0; end
    if (run1 > max1_seen) max1_seen = run1;
    if (run0 > max0_seen) max0_seen = run0;
  endfunction

  function automatic bit pair_ok(code_t w0, code_t w1);
    logic [19:0] s;
    int r1, r0;
    s = {w0, w1};
    r1 = 0; r0 = 0;
    for (int i = 19; i >= 0; i--) begin
      if (s[i]) begin r1++; r0 = 0; end else begin r0++; r1 = 0; end
      if (r1 > MAX_ONES || r0 > MAX_ZEROS) return 1'b0;
    end
    return 1'b1;
  endfunction

  int n_a, n_b, n_special, n_table;

  initial begin
    code_t words [256];
    int bad_pairs;
    // Phase 1: every pair of codewords.
    for (int v = 0; v < 256; v++) begin
      enc_data = data_t'(v);
      #1;
      words[v] = enc_code;
    end
    bad_pairs = 0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        checks++;
        if (!pair_ok(words[i], words[j])) begin
          failures++;
          bad_pairs++;
          if (bad_pairs < 5) $display("FAIL pair %02h %02h: %010b %010b", i, j, words[i], words[j]);
        end
      end

    // Phase 2: serial stream with loop-back.
    run1 = 0; run0 = 0; max1_seen = 0; max0_seen = 0;
    n_a = 0; n_b = 0; n_special = 0; n_table = 0;
    for (int n = 0; n < STREAM_BYTES + 256; n++) begin
      data_t v;
      v = (n < 256) ? data_t'(n) : data_t'($urandom);
      enc_data = v;
      #1;
      dec_code = enc_code;
      #1;
      for (int i = 9; i >= 0; i--) push_bit(enc_code[i]);
      checks++;
      if (run1 > MAX_ONES || run0 > MAX_ZEROS || max1_seen > MAX_ONES || max0_seen > MAX_ZEROS) begin
        failures++;
        $display("FAIL run limit broken after byte %0d (%02h)", n, v);
        max1_seen = 0; max0_seen = 0;
      end
      checks++;
      if (dec_data !== v) begin
        failures++;
        $display("FAIL byte %02h -> %03h -> %02h", v, enc_code, dec_data);
      end
      if (v[7:6] != 2'b00)                        n_table++;
      else if (v[5:4] == 2'b11)                   n_b++;
      else if (v[3:0] == 4'hF)                    n_special++;
      else                                        n_a++;
    end
    $display("paths: ModuleA/d=%0d ModuleB/h=%0d special=%0d table=%0d", n_a, n_b, n_special, n_table);
    $display("longest runs in stream: ones=%0d zeros=%0d", max1_seen, max0_seen);
    checks += 6;
    if (n_a == 0)       begin failures++; $display("FAIL Module A path never used"); end
    if (n_b == 0)       begin failures++; $display("FAIL Module B path never used"); end
    if (n_special == 0) begin failures++; $display("FAIL special word never used"); end
    if (n_table == 0)   begin failures++; $display("FAIL table path never used"); end
    if (max1_seen != MAX_ONES)  begin failures++; $display("FAIL run of two ones never reached"); end
    if (max0_seen != MAX_ZEROS) begin failures++; $display("FAIL run of six zeros never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
