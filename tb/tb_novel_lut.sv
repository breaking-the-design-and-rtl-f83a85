// tb_novel_lut: programs LUT_7 + 7:LUT_2 (156 key bits) through its scan
// chain with random keys and compares its output for all 2^14 input values
// with the look-up reference model. Also programs a key that makes the block
// a known gate-level function (each small LUT an AND of its pair, the large
// LUT the parity of its selects) and checks that function directly.
module tb_novel_lut;
  import lut_obf_pkg::*;
  import lut_ref_pkg::*;

  localparam int unsigned N = LUT_SIZE;
  localparam int unsigned K = novel_key_bits(N);

  logic sclk = 0, si = 0, we = 0, se = 0;
  logic so, out;
  logic [N-1:0][1:0] in = '0;
  int checks = 0, failures = 0;

  novel_lut dut (.sclk, .si, .we, .se, .so, .in, .out);

  task automatic shift(input logic b);
    si = b; #1 sclk = 1; #1 sclk = 0; #1;
  endtask

  task automatic load_key(input key_t key);
    se = 0; #1;
    for (int s = 0; s < K; s++) shift(key[K-1-s]);
    #1 we = 1; #2 we = 0; #1 se = 1; #1;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_t key;
    int bad;
    #1;
    for (int r = 0; r < 3; r++) begin
      key = random_key(K);
      load_key(key);
      bad = 0;
      for (int a = 0; a < (1 << (2*N)); a++) begin
        in = (2*N)'(a);
        #1;
        checks++;
        if (out !== ref_novel(key, N, 16'(a))) begin
          failures++;
          if (bad++ < 5) $display("FAIL key %0d in=%h got %0b", r, a, out);
        end
      end
    end
    // known function: small LUTs = AND (entries 0001), large LUT = parity
    key = '0;
    for (int e = 0; e < (1 << N); e++) key[e] = ^e;
    for (int j = 0; j < N; j++) key[(1 << N) + 4*j + 3] = 1'b1;
    load_key(key);
    for (int r = 0; r < 2000; r++) begin
      logic exp;
      in = (2*N)'($urandom);
      exp = 0;
      for (int j = 0; j < N; j++) exp ^= in[j][1] & in[j][0];
      #1;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL AND/parity in=%h got %0b", in, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
