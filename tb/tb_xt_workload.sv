// tb_xt_workload: cycle penalty of the crosstalk-free bus on an instruction
// stream, for 32-bit and for 16-bit channels on a 128-bit bus.
//
// Four runners consume the same demand list (a four-issue processor that on
// average commits well under the fetch rate: 0..4 instructions per step,
// mean 1.6 per cycle, i.e. 40% of the four-per-cycle fetch rate). Two carry instruction-like programs from the same generator, two carry a program that never switches any wire
// and so never loses a cycle to NOP segments. The difference in total cycles
// between a real-program runner and its reference is the penalty of the
// encoding; the test prints it together with the share of bits that would
// have formed undesirable pairs on a plain bus, and requires the penalty to
// stay below 2% of the total cycle count. Instruction order is checked by the
// runners. For the power view a fifth runner streams words at full rate (the
// processor takes four per cycle, so the bus is never idle) and the test
// prints the transition toggles of its encoded bus as a share of the total
// toggles (coupling + transition) of a plain bus carrying the same words back
// to back; every encoded bus must show no coupling toggles at all. A watchdog bounds the
// run.
module tb_xt_workload;

  localparam int unsigned WORDS = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [2:0] dem [WORDS * 4];
  logic [2:0] dem_full [WORDS * 4];   // processor takes four per cycle: bus at full rate

  logic        d32, d32r, d16, d16r;
  int unsigned c32, c32r, c16, c16r, u32, u32r, u16, u16r;
  int unsigned k32, k32r, k16, k16r, f32, f32r, f16, f16r;
  logic        dp;
  int unsigned cp, up, kp, fp, ptp, etp, ecp;
  int unsigned pt32, et32, ec32, pt16, et16, ec16, pt_r1, et_r1, ec_r1, pt_r2, et_r2, ec_r2;
  int unsigned checks = 0, failures = 0;

  xt_workload_runner #(.CH_W(32), .CONST_PROG(1'b0), .WORDS(WORDS), .SEED(7)) r32 (
    .clk(clk), .rst_n(rst_n), .dem(dem), .done(d32), .cycles(c32), .undesirable_bits(u32), .plain_ttoggle(pt32), .enc_ttoggle(et32), .enc_ctoggle(ec32),
    .checks(k32), .failures(f32));
  xt_workload_runner #(.CH_W(32), .CONST_PROG(1'b1), .WORDS(WORDS), .SEED(7)) r32r (
    .clk(clk), .rst_n(rst_n), .dem(dem), .done(d32r), .cycles(c32r), .undesirable_bits(u32r), .plain_ttoggle(pt_r1), .enc_ttoggle(et_r1), .enc_ctoggle(ec_r1),
    .checks(k32r), .failures(f32r));
  xt_workload_runner #(.CH_W(16), .CONST_PROG(1'b0), .WORDS(WORDS), .SEED(7)) r16 (
    .clk(clk), .rst_n(rst_n), .dem(dem), .done(d16), .cycles(c16), .undesirable_bits(u16), .plain_ttoggle(pt16), .enc_ttoggle(et16), .enc_ctoggle(ec16),
    .checks(k16), .failures(f16));
  xt_workload_runner #(.CH_W(16), .CONST_PROG(1'b1), .WORDS(WORDS), .SEED(7)) r16r (
    .clk(clk), .rst_n(rst_n), .dem(dem), .done(d16r), .cycles(c16r), .undesirable_bits(u16r), .plain_ttoggle(pt_r2), .enc_ttoggle(et_r2), .enc_ctoggle(ec_r2),
    .checks(k16r), .failures(f16r));

  xt_workload_runner #(.CH_W(32), .CONST_PROG(1'b0), .WORDS(WORDS), .SEED(11)) rp (
    .clk(clk), .rst_n(rst_n), .dem(dem_full), .done(dp), .cycles(cp), .undesirable_bits(up),
    .plain_ttoggle(ptp), .enc_ttoggle(etp), .enc_ctoggle(ecp), .checks(kp), .failures(fp));

  task automatic report();
    checks   = checks + k32 + k32r + k16 + k16r + kp;
    failures = failures + f32 + f32r + f16 + f16r + fp;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    report();
    $finish;
  end

  initial begin
    real p32, p16, ratio;
    for (int unsigned s = 0; s < WORDS * 4; s++) begin
      int unsigned r;
      r = $urandom() % 10;
      dem_full[s] = 3'd4;
      dem[s] = (r < 2) ? 3'd0 : (r < 5) ? 3'd1 : (r < 8) ? 3'd2 : (r < 9) ? 3'd3 : 3'd4;
    end
    dem[0] = 3'd1;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    wait (d32 === 1'b1 && d32r === 1'b1 && d16 === 1'b1 && d16r === 1'b1 && dp === 1'b1);
    @(negedge clk);
    p32   = 100.0 * (real'(c32) - real'(c32r)) / real'(c32r);
    p16   = 100.0 * (real'(c16) - real'(c16r)) / real'(c16r);
    ratio = 100.0 * real'(u32) / real'(WORDS * 128);
    $display("instructions %0d, undesirable bits on a plain bus %0d (%0.2f%%)", WORDS * 4, u32, ratio);
    $display("32-bit channels: %0d cycles, reference %0d, penalty %0d (%0.4f%%)", c32, c32r, int'(c32) - int'(c32r), p32);
    $display("16-bit channels: %0d cycles, reference %0d, penalty %0d (%0.4f%%)", c16, c16r, int'(c16) - int'(c16r), p16);
    $display("full-rate stream, 32-bit channels: %0d words in %0d cycles; plain bus coupling %0d + transition %0d toggles; encoded bus transition %0d (%0.1f%% of the plain total), coupling %0d",
             WORDS, cp, up, ptp, etp, 100.0 * real'(etp) / real'(up + ptp), ecp);
    checks += 5;
    if (ec32 != 0 || ec16 != 0 || ec_r1 != 0 || ec_r2 != 0 || ecp != 0) begin failures++; $display("FAIL coupling toggles on the encoded bus"); end
    if (u32 == 0 || u32r != 0) begin failures++; $display("FAIL stream statistics"); end
    if (c32 < c32r || c16 < c16r) begin failures++; $display("FAIL faster than the reference"); end
    if (p32 > 2.0) begin failures++; $display("FAIL 32-bit channel penalty above 2%%"); end
    if (p16 > 2.0) begin failures++; $display("FAIL 16-bit channel penalty above 2%%"); end
    report();
    $finish;
  end

endmodule
