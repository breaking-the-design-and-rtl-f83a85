// tb_mtj_latch: checks the MTJ latch cell model. Scan flip-flop capture, write
// of both values, pre-charge outputs while SE is low, complementary Q/QB after
// sensing, that shifting new data after the write changes neither the sensed
// value nor the stored one (re-sensed after a simulated power cycle), and that
// a new write overwrites the stored value.
module tb_mtj_latch;

  logic sclk = 0, si = 0, we = 0, se = 0;
  logic so, q, qb;
  int checks = 0, failures = 0;

  mtj_latch dut (.sclk, .si, .we, .se, .so, .q, .qb);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic shift(input logic b);
    si = b; #1 sclk = 1; #1 sclk = 0; #1;
  endtask

  task automatic write_pulse();
    #1 we = 1; #2 we = 0; #1;
  endtask

  task automatic sense();
    se = 0; #1 se = 1; #1;
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int r = 0; r < 8; r++) begin
      logic v;
      v = 1'($urandom);
      shift(v);
      check(so, v, "scan out after shift");
      write_pulse();
      se = 0; #1;
      check(q, 1'b0, "pre-charge q");
      check(qb, 1'b0, "pre-charge qb");
      sense();
      check(q, v, "sensed q");
      check(qb, ~v, "sensed qb");
      // scan chain flushed with the other value: sensed output stays
      shift(~v);
      check(so, ~v, "scan out after flush");
      check(q, v, "q after flush");
      // power cycle: pre-charge and sense again, the MTJ still holds v
      se = 0; #2;
      sense();
      check(q, v, "q after re-sense");
      se = 0; #1;
    end
    // overwrite: stored value follows the last write
    shift(1'b1); write_pulse(); sense(); check(q, 1'b1, "write 1");
    se = 0; #1;
    shift(1'b0); write_pulse(); sense(); check(q, 1'b0, "overwrite 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
