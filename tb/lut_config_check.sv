// lut_config_check: testbench helper. Builds one lut_obf_top with the given
// LUT size and counts, programs random keys into its STT-form LUTs through the
// configuration chain (NL*K shifts, WE pulse, SE edge), drives random keys on
// its keyed-form LUTs, and compares every LUT with the look-up reference on
// random input vectors. Reports its check and failure counts when done.
module lut_config_check
  import lut_obf_pkg::*;
  import lut_ref_pkg::*;
#(
  parameter int unsigned N  = 7,
  parameter int unsigned NL = 2,
  parameter int unsigned NK = 1,
  parameter int unsigned VECTORS = 200
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned K = novel_key_bits(N);

  logic cfg_sclk = 0, cfg_si = 0, cfg_we = 0, cfg_se = 0;
  logic [NL-1:0][N-1:0][1:0] lut_in = '0;
  logic [NL-1:0] lut_out;
  logic [NK-1:0][K-1:0] key_in = '0;
  logic [NK-1:0][N-1:0][1:0] keyed_in = '0;
  logic [NK-1:0] keyed_out;

  lut_obf_top #(.N(N), .NUM_LUTS(NL), .NUM_KEYED_LUTS(NK)) dut (.*);

  key_t keys [NL];
  key_t kk [NK];

  initial begin
    done = 0;
    checks = 0;
    failures = 0;
    #1;
    for (int i = 0; i < NL; i++) keys[i] = random_key(K);
    for (int s = 0; s < NL*K; s++) begin
      int unsigned pos;
      pos = NL*K - 1 - s;
      cfg_si = keys[pos / K][pos % K];
      #1 cfg_sclk = 1; #1 cfg_sclk = 0; #1;
    end
    #1 cfg_we = 1; #2 cfg_we = 0; #1 cfg_se = 1; #1;
    for (int i = 0; i < NK; i++) begin
      kk[i] = random_key(K);
      key_in[i] = kk[i][K-1:0];
    end
    for (int v = 0; v < VECTORS; v++) begin
      for (int i = 0; i < NL; i++) lut_in[i] = (2*N)'($urandom);
      for (int i = 0; i < NK; i++) keyed_in[i] = (2*N)'($urandom);
      #1;
      for (int i = 0; i < NL; i++) begin
        checks++;
        if (lut_out[i] !== ref_novel(keys[i], N, 16'(lut_in[i]))) failures++;
      end
      for (int i = 0; i < NK; i++) begin
        checks++;
        if (keyed_out[i] !== ref_novel(kk[i], N, 16'(keyed_in[i]))) failures++;
      end
    end
    done = 1;
  end

endmodule
