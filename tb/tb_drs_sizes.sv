// tb_drs_sizes: runs the scheduler at the other task list sizes whose cost
// the original description compares (16, 64 and 128 entries), each with a
// large dependency window, next to each other. Each instance gets random
// double-buffered lists and a full scoreboard (see drs_env).
module tb_drs_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic d16, d64, d128;
  int   c16, c64, c128, f16, f64, f128;

  drs_env #(.LIST_LEN(16),  .DEP_DEPTH(16), .NL(6)) u16  (.clk, .done(d16),  .checks(c16),  .failures(f16));
  drs_env #(.LIST_LEN(64),  .DEP_DEPTH(64), .NL(4)) u64  (.clk, .done(d64),  .checks(c64),  .failures(f64));
  drs_env #(.LIST_LEN(128), .DEP_DEPTH(64), .NL(3)) u128 (.clk, .done(d128), .checks(c128), .failures(f128));

  int checks, failures;

  initial begin
    wait (d16 && d64 && d128);
    checks = c16 + c64 + c128;
    failures = f16 + f64 + f128;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c64 + c128, f16 + f64 + f128 + 1);
    $finish;
  end
endmodule
