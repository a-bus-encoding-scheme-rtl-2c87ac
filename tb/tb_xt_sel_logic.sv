// tb_xt_sel_logic: self-checking test of the per-channel select logic.
//
// Two instances are checked: channel 3 of 4 (index 2) with the all-0 NOP
// encoding and channel 4 of 4 (index 3) with the all-1 NOP encoding. Every
// combination of placed_in and win_cnt is driven with random cross-detector
// flags and segments. Expected result, worked out here: the segment next in
// line (number placed_in) is sent if it exists and its detector is clear;
// otherwise the channel carries the NOP pattern with the NOP value on the
// distinction wire. Combinational block; a watchdog bounds the run.
module tb_xt_sel_logic;

  localparam int unsigned N = 4, W = 32, CNT_W = 3;

  // Instance A: channel index 2, NOP = all 0.
  logic [CNT_W-1:0]   a_placed_in, a_win_cnt, a_placed_out;
  logic [2:0][W-1:0]  a_cand;
  logic [2:0]         a_xt;
  logic [W-1:0]       a_seg;
  logic               a_wd, a_data;
  // Instance B: channel index 3, NOP = all 1.
  logic [CNT_W-1:0]   b_placed_in, b_win_cnt, b_placed_out;
  logic [3:0][W-1:0]  b_cand;
  logic [3:0]         b_xt;
  logic [W-1:0]       b_seg;
  logic               b_wd, b_data;

  int unsigned checks = 0, failures = 0;

  xt_sel_logic #(.N(N), .CH_W(W), .CH(2), .NOP_ONES(1'b0)) dut_a (
    .placed_in(a_placed_in), .win_cnt(a_win_cnt), .cand_seg(a_cand), .xt(a_xt),
    .seg_out(a_seg), .wd_out(a_wd), .is_data(a_data), .placed_out(a_placed_out));

  xt_sel_logic #(.N(N), .CH_W(W), .CH(3), .NOP_ONES(1'b1)) dut_b (
    .placed_in(b_placed_in), .win_cnt(b_win_cnt), .cand_seg(b_cand), .xt(b_xt),
    .seg_out(b_seg), .wd_out(b_wd), .is_data(b_data), .placed_out(b_placed_out));

  task automatic expect_eq(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    int unsigned sent_a = 0, nop_a = 0;
    for (int rep = 0; rep < 300; rep++) begin
      for (int p = 0; p <= 3; p++) begin
        for (int wc = 0; wc <= 4; wc++) begin
          bit take;
          a_placed_in = CNT_W'(p > 2 ? 2 : p);
          b_placed_in = CNT_W'(p);
          a_win_cnt   = CNT_W'(wc);
          b_win_cnt   = CNT_W'(wc);
          for (int j = 0; j < 4; j++) begin
            b_cand[j] = $urandom();
            if (j < 3) a_cand[j] = $urandom();
          end
          a_xt = 3'($urandom());
          b_xt = 4'($urandom());
          #1;
          // instance A
          take = (int'(a_placed_in) < wc) && !a_xt[a_placed_in];
          expect_eq(W'(a_data), W'(take), "A is_data");
          expect_eq(W'(a_wd), W'(take), "A distinction wire");
          expect_eq(a_seg, take ? a_cand[a_placed_in] : '0, "A segment");
          expect_eq(W'(a_placed_out), W'(a_placed_in) + W'(take), "A placed_out");
          if (take) sent_a++; else nop_a++;
          // instance B
          take = (p < wc) && !b_xt[p];
          expect_eq(W'(b_data), W'(take), "B is_data");
          expect_eq(W'(b_wd), W'(!take), "B distinction wire");
          expect_eq(b_seg, take ? b_cand[p] : '1, "B segment");
          expect_eq(W'(b_placed_out), W'(p) + W'(take), "B placed_out");
        end
      end
    end
    checks++;
    if (sent_a == 0 || nop_a == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
