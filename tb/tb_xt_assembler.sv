// tb_xt_assembler: runs the assembler checker on the main configuration
// (128-bit bus, 32-bit channels and instructions, all-0 NOP), on 16-bit
// channels with the all-1 NOP encoding, on 8-bit channels (four segments
// per instruction) and on 32-bit channels carrying 64-bit data words (the
// data-bus use), then reports the total.
module tb_xt_assembler;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        done_a, done_b, done_c, done_d;
  int unsigned checks_a, checks_b, checks_c, checks_d, fail_a, fail_b, fail_c, fail_d;
  int unsigned checks, failures;

  xt_assembler_checker #(.BUS_W(128), .CH_W(32), .NOP_ONES(1'b0)) u_a (
    .clk(clk), .done(done_a), .checks(checks_a), .failures(fail_a));
  xt_assembler_checker #(.BUS_W(128), .CH_W(16), .NOP_ONES(1'b1)) u_b (
    .clk(clk), .done(done_b), .checks(checks_b), .failures(fail_b));
  xt_assembler_checker #(.BUS_W(128), .CH_W(8), .NOP_ONES(1'b0)) u_c (
    .clk(clk), .done(done_c), .checks(checks_c), .failures(fail_c));
  xt_assembler_checker #(.BUS_W(128), .CH_W(32), .INSTR_W(64), .NOP_ONES(1'b0)) u_d (
    .clk(clk), .done(done_d), .checks(checks_d), .failures(fail_d));

  initial begin
    repeat (50000) @(posedge clk);
    checks   = checks_a + checks_b + checks_c + checks_d;
    failures = fail_a + fail_b + fail_c + fail_d + 1;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done_a === 1'b1 && done_b === 1'b1 && done_c === 1'b1 && done_d === 1'b1);
    checks   = checks_a + checks_b + checks_c + checks_d;
    failures = fail_a + fail_b + fail_c + fail_d;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
