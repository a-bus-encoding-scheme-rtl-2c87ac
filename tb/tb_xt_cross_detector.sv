// tb_xt_cross_detector: self-checking test of the undesirable-pattern detector.
//
// Directed cases (the 0101 -> 1010 example, all-0 and all-1 NOP segments in
// both directions, same-direction switching, one wire static) and random
// pairs biased towards many switching wires. The reference walks the wires
// one adjacent pair at a time and asks whether one rises while the other
// falls. Combinational block, so there is no latency to check; a watchdog
// bounds the run anyway.
module tb_xt_cross_detector;

  localparam int unsigned W = 32;

  logic [W-1:0] prev_seg, cur_seg;
  logic         crosstalk;
  int unsigned  checks = 0, failures = 0;

  xt_cross_detector #(.CH_W(W)) dut (.prev_seg(prev_seg), .cur_seg(cur_seg), .crosstalk(crosstalk));

  function automatic logic ref_xt(logic [W-1:0] p, logic [W-1:0] c);
    for (int k = 0; k < W - 1; k++) begin
      // wire k and k+1 both switch, and in opposite directions
      if (p[k] != c[k] && p[k+1] != c[k+1] && c[k] != c[k+1]) return 1'b1;
    end
    return 1'b0;
  endfunction

  task automatic check(logic [W-1:0] p, logic [W-1:0] c, string what);
    prev_seg = p;
    cur_seg  = c;
    #1;
    checks++;
    if (crosstalk !== ref_xt(p, c)) begin
      failures++;
      $display("FAIL %s: prev=%h cur=%h got %0b expected %0b", what, p, c, crosstalk, ref_xt(p, c));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b;
    int unsigned hits = 0;
    // Directed cases.
    check(32'h5555_5555, 32'hAAAA_AAAA, "0101->1010");
    if (!crosstalk) begin failures++; $display("FAIL 0101->1010 not flagged"); end
    check(32'h0000_0005, 32'h0000_000A, "low nibble swap");
    if (!crosstalk) begin failures++; $display("FAIL low nibble swap not flagged"); end
    check(32'h8000_0000, 32'h4000_0000, "top pair swap");
    if (!crosstalk) begin failures++; $display("FAIL top pair swap not flagged"); end
    check(32'h0000_0000, 32'hDEAD_BEEF, "NOP -> data");
    if (crosstalk) begin failures++; $display("FAIL NOP->data flagged"); end
    check(32'hDEAD_BEEF, 32'h0000_0000, "data -> NOP");
    if (crosstalk) begin failures++; $display("FAIL data->NOP flagged"); end
    check(32'hFFFF_FFFF, 32'h1234_5678, "all-1 -> data");
    check(32'h0F0F_0F0F, 32'hF0F0_F0F0, "nibble flip");
    check(32'h0000_FFFF, 32'hFFFF_0000, "half swap");
    check(32'h1234_5678, 32'h1234_5678, "no change");
    // Random: a mix of sparse and dense differences.
    for (int n = 0; n < 20000; n++) begin
      a = $urandom();
      case (n % 4)
        0: b = $urandom();
        1: b = a ^ (32'h3 << ($urandom() % 31));
        2: b = a ^ (1 << ($urandom() % 32));
        default: b = ~a;
      endcase
      check(a, b, "random");
      if (crosstalk) hits++;
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL random never flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
