// tb_stt_lut: programs a size-7 STT-LUT (128 MTJ latch cells) through its
// scan chain with random truth tables, checks every input value, checks that
// the scan-out needs exactly 2^N shifts to return the first bit, and that the
// LUT keeps its function after the chain has been flushed. A second, size-2
// STT-LUT is loaded with the example configuration MTJ_0..MTJ_3 = 0, 1, 1, 0
// and must then act as the exclusive OR of its two inputs.
module tb_stt_lut;

  localparam int unsigned N = 7;
  localparam int unsigned E = 1 << N;

  logic sclk = 0, si = 0, we = 0, se = 0;
  logic so, out;
  logic [N-1:0] in = '0;
  int checks = 0, failures = 0;

  stt_lut dut (.sclk, .si, .we, .se, .so, .in, .out);

  logic so2, out2;
  logic [1:0] in2 = '0;
  stt_lut #(.N(2)) dut2 (.sclk, .si, .we, .se, .so(so2), .in(in2), .out(out2));

  task automatic shift(input logic b);
    si = b; #1 sclk = 1; #1 sclk = 0; #1;
  endtask

  task automatic check_all(input logic [E-1:0] t, input string what);
    for (int a = 0; a < E; a++) begin
      in = N'(a);
      #1;
      checks++;
      if (out !== t[a]) begin
        failures++;
        $display("FAIL %s in=%0d got %0b", what, a, out);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [E-1:0] t;
    #1;
    for (int r = 0; r < 4; r++) begin
      for (int w = 0; w < E / 32; w++) t[32*w +: 32] = $urandom;
      se = 0;
      for (int s = 0; s < E; s++) shift(t[E-1-s]);
      // the first bit shifted in is now at the scan-out, not before
      checks++;
      if (so !== t[E-1]) begin failures++; $display("FAIL scan-out latency"); end
      #1 we = 1; #2 we = 0; #1 se = 1; #1;
      check_all(t, "programmed");
      for (int s = 0; s < E; s++) shift(1'($urandom));
      check_all(t, "after flush");
    end
    // size-2 example: MTJ_0..3 = 0,1,1,0, shifted MTJ_3 first; dut2 sits on
    // the same SCLK/SI, so dut gets the same four bits and is ignored here
    se = 0;
    for (int s = 3; s >= 0; s--) shift(4'b0110 >> s);
    #1 we = 1; #2 we = 0; #1 se = 1; #1;
    for (int a = 0; a < 4; a++) begin
      in2 = 2'(a);
      #1;
      checks++;
      if (out2 !== (in2[1] ^ in2[0])) begin
        failures++;
        $display("FAIL size-2 example in=%0d got %0b", a, out2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
