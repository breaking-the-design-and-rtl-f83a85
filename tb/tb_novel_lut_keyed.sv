// tb_novel_lut_keyed: drives LUT_7 + 7:LUT_2 in its external-key form with
// random keys and random inputs and compares with the look-up reference
// model; one key is checked on all 2^14 input values.
module tb_novel_lut_keyed;
  import lut_obf_pkg::*;
  import lut_ref_pkg::*;

  localparam int unsigned N = LUT_SIZE;
  localparam int unsigned K = novel_key_bits(N);

  logic [K-1:0] key;
  logic [N-1:0][1:0] in;
  logic out;
  int checks = 0, failures = 0;

  novel_lut_keyed dut (.key, .in, .out);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_t k;
    int bad;
    bad = 0;
    k = random_key(K);
    key = k[K-1:0];
    for (int a = 0; a < (1 << (2*N)); a++) begin
      in = (2*N)'(a);
      #1;
      checks++;
      if (out !== ref_novel(k, N, 16'(a))) begin
        failures++;
        if (bad++ < 5) $display("FAIL exhaustive in=%h got %0b", a, out);
      end
    end
    for (int r = 0; r < 20000; r++) begin
      if (r % 100 == 0) begin
        k = random_key(K);
        key = k[K-1:0];
      end
      in = (2*N)'($urandom);
      #1;
      checks++;
      if (out !== ref_novel(k, N, 16'(in))) begin
        failures++;
        if (bad++ < 5) $display("FAIL random in=%h got %0b", in, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
