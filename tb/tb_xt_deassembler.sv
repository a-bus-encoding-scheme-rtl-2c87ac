// tb_xt_deassembler: runs the deassembler checker on the main configuration
// (128-bit bus, 32-bit channels, all-0 NOP) and on 16-bit channels with the
// all-1 NOP encoding, then reports the total.
module tb_xt_deassembler;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        done_a, done_b;
  int unsigned checks_a, checks_b, fail_a, fail_b;
  int unsigned checks, failures;

  xt_deassembler_checker #(.BUS_W(128), .CH_W(32), .NOP_ONES(1'b0)) u_a (
    .clk(clk), .done(done_a), .checks(checks_a), .failures(fail_a));
  xt_deassembler_checker #(.BUS_W(128), .CH_W(16), .NOP_ONES(1'b1)) u_b (
    .clk(clk), .done(done_b), .checks(checks_b), .failures(fail_b));

  initial begin
    repeat (50000) @(posedge clk);
    checks   = checks_a + checks_b;
    failures = fail_a + fail_b + 1;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done_a === 1'b1 && done_b === 1'b1);
    checks   = checks_a + checks_b;
    failures = fail_a + fail_b;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
