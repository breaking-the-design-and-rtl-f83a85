// tb_mtj_latch_chain: shifts random patterns through a column of 16 MTJ latch
// cells, checks that the scan-out returns each bit exactly LEN shifts after it
// went in, writes and senses the column and compares every q with the bit
// meant for that cell; then flushes the chain and checks that q is unchanged.
module tb_mtj_latch_chain;

  localparam int unsigned LEN = 16;

  logic sclk = 0, si = 0, we = 0, se = 0;
  logic so;
  logic [LEN-1:0] q;
  int checks = 0, failures = 0;

  mtj_latch_chain dut (.sclk, .si, .we, .se, .so, .q);

  task automatic shift(input logic b);
    si = b; #1 sclk = 1; #1 sclk = 0; #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [LEN-1:0] pat, pat2;
    #1;
    for (int r = 0; r < 6; r++) begin
      pat = LEN'($urandom);
      // bit for cell k must go in at shift LEN-1-k
      for (int s = 0; s < LEN; s++) shift(pat[LEN-1-s]);
      write_and_sense();
      checks++;
      if (q !== pat) begin
        failures++;
        $display("FAIL pattern %0d: q=%h expected %h", r, q, pat);
      end
      // shift a new pattern: the old one must come out of SO in order
      pat2 = LEN'($urandom);
      for (int s = 0; s < LEN; s++) begin
        checks++;
        if (so !== pat[LEN-1-s]) begin
          failures++;
          $display("FAIL scan-out bit %0d", s);
        end
        shift(pat2[LEN-1-s]);
      end
      checks++;
      if (q !== pat) begin
        failures++;
        $display("FAIL q changed by shifting: %h", q);
      end
      se = 0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_and_sense();
    se = 0; #1 we = 1; #2 we = 0; #1 se = 1; #1;
  endtask

endmodule
