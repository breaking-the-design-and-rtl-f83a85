// tb_lut_mux: drives the 128:1 LUT mux (default N = 7) with random tables and
// every select value, and compares with the table entry addressed by sel.
module tb_lut_mux;

  localparam int unsigned N = 7;

  logic [(1<<N)-1:0] cfg;
  logic [N-1:0] sel;
  logic out;
  int checks = 0, failures = 0;

  lut_mux dut (.cfg, .sel, .out);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int w = 0; w < (1 << N) / 32; w++) cfg[32*w +: 32] = $urandom;
      if (r == 0) cfg = '0;
      if (r == 1) cfg = '1;
      for (int s = 0; s < (1 << N); s++) begin
        sel = N'(s);
        #1;
        checks++;
        if (out !== cfg[s]) begin
          failures++;
          $display("FAIL table %0d sel %0d: got %0b", r, s, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
