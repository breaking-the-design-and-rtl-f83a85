// tb_lut_obf_top: end-to-end test of the obfuscation fabric at its default
// size (two LUT_7 + 7:LUT_2 blocks in STT form on one 312-bit configuration
// chain, two in external-key form). It goes through the life of the key:
//   * program: shift the whole chain, pulse WE, fire SE; compare every LUT
//     with the look-up reference on random input vectors (an error count, as
//     a functional test of an obfuscated netlist would keep);
//   * flush: shift random data through the chain after programming; the
//     LUTs must not change;
//   * power cycle: drop SE (pre-charge) and fire it again; the key comes back
//     from the MTJs although the scan flip-flops no longer hold it;
//   * chain length: one shift short leaves every LUT holding the key moved by
//     one position, which the test checks against the reference;
//   * gate replacement: a key that makes each small LUT a buffer and the large
//     LUT a chosen 7-input function (majority);
//   * wrong key: a random key in place of the right one must corrupt outputs
//     (non-zero error count), in both STT and keyed form;
//   * keyed form: random keys on key_in against the reference.
// Each of these is counted, and one that never happened counts as a failure.
module tb_lut_obf_top;
  import lut_obf_pkg::*;
  import lut_ref_pkg::*;

  localparam int unsigned N  = LUT_SIZE;
  localparam int unsigned K  = novel_key_bits(N);
  localparam int unsigned NL = DEFAULT_NUM_LUTS;
  localparam int unsigned NK = 2;
  localparam int unsigned VECTORS = 500;

  logic cfg_sclk = 0, cfg_si = 0, cfg_we = 0, cfg_se = 0;
  logic [NL-1:0][N-1:0][1:0] lut_in = '0;
  logic [NL-1:0] lut_out;
  logic [NK-1:0][K-1:0] key_in = '0;
  logic [NK-1:0][N-1:0][1:0] keyed_in = '0;
  logic [NK-1:0] keyed_out;

  lut_obf_top dut (.*);

  int checks = 0, failures = 0;
  int n_shift = 0, n_write = 0, n_sense = 0, n_flush = 0, n_power_cycle = 0;
  int n_short_chain = 0, n_gate_map = 0, n_wrong_key = 0, n_keyed_wrong = 0;
  int n_keyed = 0;

  key_t keys [NL];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic shift(input logic b);
    cfg_si = b; #1 cfg_sclk = 1; #1 cfg_sclk = 0; #1;
    n_shift++;
  endtask

  // Shift the keys of all LUTs in: chain position i*K+p holds keys[i][p];
  // the highest position goes in first. `skip_last` omits the final shift.
  task automatic shift_keys(input key_t k [NL], input bit skip_last);
    for (int s = 0; s < NL*K; s++) begin
      int unsigned pos;
      pos = NL*K - 1 - s;
      if (!(skip_last && s == NL*K - 1)) shift(k[pos / K][pos % K]);
    end
  endtask

  task automatic write_pulse();
    cfg_se = 0; #1 cfg_we = 1; #2 cfg_we = 0; #1;
    n_write++;
  endtask

  task automatic sense();
    cfg_se = 0; #1 cfg_se = 1; #1;
    n_sense++;
  endtask

  // Error count of LUT i against the reference for key k on random vectors.
  task automatic count_errors(input int i, input key_t k, output int errs);
    errs = 0;
    for (int v = 0; v < VECTORS; v++) begin
      lut_in[i] = (2*N)'($urandom);
      #1;
      if (lut_out[i] !== ref_novel(k, N, 16'(lut_in[i]))) errs++;
    end
  endtask

  task automatic check_all_luts(input key_t k [NL], input string what);
    int errs;
    for (int i = 0; i < NL; i++) begin
      count_errors(i, k[i], errs);
      check(errs == 0, $sformatf("%s: LUT %0d error count %0d", what, i, errs));
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_t shifted [NL];
    key_t wrong [NL];
    int errs, shifts_before;
    #1;

    // 1. program and check
    for (int i = 0; i < NL; i++) keys[i] = random_key(K);
    shifts_before = n_shift;
    shift_keys(keys, 0);
    check(n_shift - shifts_before == NL*K, "programming takes NUM_LUTS*K shifts");
    write_pulse();
    sense();
    check_all_luts(keys, "programmed");

    // 2. flush the chain: the sensed keys stay
    for (int s = 0; s < NL*K; s++) shift(1'($urandom));
    n_flush++;
    check_all_luts(keys, "after flush");

    // 3. power cycle: pre-charge, fire SE again
    cfg_se = 0; #5;
    sense();
    n_power_cycle++;
    check_all_luts(keys, "after power cycle");

    // 4. one shift short: every position p holds chain bit p+1
    for (int s = 0; s < NL*K; s++) shift(1'b0);
    shift_keys(keys, 1);
    for (int i = 0; i < NL; i++) begin
      shifted[i] = '0;
      for (int p = 0; p < K; p++) begin
        int unsigned g;
        g = i*K + p + 1;
        shifted[i][p] = (g < NL*K) ? keys[g / K][g % K] : 1'b0;
      end
    end
    write_pulse();
    sense();
    n_short_chain++;
    check_all_luts(shifted, "one shift short");

    // 5. gate replacement: buffers on the small LUTs, majority on the large
    for (int i = 0; i < NL; i++) begin
      keys[i] = '0;
      for (int e = 0; e < (1 << N); e++) keys[i][e] = ($countones(e) > N/2);
      // buffer of pair bit (i % 2): entries a with a[i%2] = 1
      for (int j = 0; j < N; j++)
        for (int a = 0; a < 4; a++) keys[i][(1 << N) + 4*j + a] = a[i % 2];
    end
    shift_keys(keys, 0);
    write_pulse();
    sense();
    for (int i = 0; i < NL; i++) begin
      errs = 0;
      for (int v = 0; v < VECTORS; v++) begin
        logic [N-1:0] picked;
        lut_in[i] = (2*N)'($urandom);
        for (int j = 0; j < N; j++) picked[j] = lut_in[i][j][i % 2];
        #1;
        if (lut_out[i] !== ($countones(picked) > N/2)) errs++;
      end
      check(errs == 0, $sformatf("majority mapping LUT %0d errors %0d", i, errs));
      n_gate_map++;
    end

    // 6. wrong key: outputs must differ from the intended function
    for (int i = 0; i < NL; i++) wrong[i] = random_key(K);
    shift_keys(wrong, 0);
    write_pulse();
    sense();
    for (int i = 0; i < NL; i++) begin
      count_errors(i, keys[i], errs);
      check(errs > 0, $sformatf("wrong key not visible on LUT %0d", i));
      if (errs > 0) n_wrong_key++;
    end
    check_all_luts(wrong, "wrong key matches its own reference");

    // 7. keyed form
    for (int r = 0; r < 20; r++) begin
      key_t kk [NK];
      for (int i = 0; i < NK; i++) begin
        kk[i] = random_key(K);
        key_in[i] = kk[i][K-1:0];
      end
      for (int v = 0; v < 100; v++) begin
        for (int i = 0; i < NK; i++) keyed_in[i] = (2*N)'($urandom);
        #1;
        for (int i = 0; i < NK; i++)
          check(keyed_out[i] === ref_novel(kk[i], N, 16'(keyed_in[i])),
                $sformatf("keyed LUT %0d", i));
      end
      n_keyed++;
      // a wrong key on the keyed form corrupts the outputs too
      begin
        key_t bad;
        errs = 0;
        bad = random_key(K);
        key_in[0] = bad[K-1:0];
        for (int v = 0; v < 100; v++) begin
          keyed_in[0] = (2*N)'($urandom);
          #1;
          if (keyed_out[0] !== ref_novel(kk[0], N, 16'(keyed_in[0]))) errs++;
        end
        if (errs > 0) n_keyed_wrong++;
      end
    end
    check(n_keyed_wrong > 0, "wrong key on keyed form never visible");

    $display("mechanisms: shifts=%0d writes=%0d senses=%0d flushes=%0d power_cycles=%0d short_chain=%0d gate_maps=%0d wrong_key=%0d keyed=%0d keyed_wrong=%0d",
             n_shift, n_write, n_sense, n_flush, n_power_cycle, n_short_chain,
             n_gate_map, n_wrong_key, n_keyed, n_keyed_wrong);
    check(n_shift > 0 && n_write > 0 && n_sense > 0 && n_flush > 0 &&
          n_power_cycle > 0 && n_short_chain > 0 && n_gate_map > 0 &&
          n_wrong_key > 0 && n_keyed > 0 && n_keyed_wrong > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
