// tb_lut_configs: runs the LUT configurations that the design is evaluated
// with, each as its own instance of the fabric, programmed with random keys:
//   N=8, 2 + 2 blocks  (two LUT_8 + 8:LUT_2, 576 key bits per form)
//   N=7, 2 + 2 blocks  (the main configuration, 312 key bits)
//   N=6, 6 blocks; N=5, 6 blocks; N=4, 14 blocks; N=4, 9 blocks
//     (the scale-out alternatives compared against it)
// Each instance counts its own checks; the test passes if all of them match
// the reference.
module tb_lut_configs;

  logic [5:0] done;
  int c [6];
  int f [6];

  lut_config_check #(.N(8), .NL(2),  .NK(2)) u_n8 (.done(done[0]), .checks(c[0]), .failures(f[0]));
  lut_config_check #(.N(7), .NL(2),  .NK(2)) u_n7 (.done(done[1]), .checks(c[1]), .failures(f[1]));
  lut_config_check #(.N(6), .NL(6),  .NK(1)) u_n6 (.done(done[2]), .checks(c[2]), .failures(f[2]));
  lut_config_check #(.N(5), .NL(6),  .NK(1)) u_n5 (.done(done[3]), .checks(c[3]), .failures(f[3]));
  lut_config_check #(.N(4), .NL(14), .NK(1)) u_n4a (.done(done[4]), .checks(c[4]), .failures(f[4]));
  lut_config_check #(.N(4), .NL(9),  .NK(1)) u_n4b (.done(done[5]), .checks(c[5]), .failures(f[5]));

  int checks = 0, failures = 0;

  initial begin
    #5000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (&done);
    for (int i = 0; i < 6; i++) begin
      $display("configuration %0d: checks=%0d failures=%0d", i, c[i], f[i]);
      checks += c[i];
      failures += f[i];
      if (c[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
