// tb_xt_prefetch_buffer: self-checking test of the prefetch instruction buffer.
//
// Random bursts of up to four pushes and random demand of up to four pops per
// cycle, with pushes limited to the free space. A queue in the testbench is the
// reference: every cycle avail, pop_cnt, count, fetch_en and the visible head
// entries are compared with it. Phases fill the buffer completely (fetch_en
// must drop once fewer than HEADROOM entries are free) and drain it (pop_cnt
// must be limited by what is there). An instruction pushed at one edge must be
// poppable right after it. A watchdog bounds the run.
module tb_xt_prefetch_buffer;

  localparam int unsigned W = 32, DEPTH = 32, PUSH_MAX = 4, POP_MAX = 4, HEADROOM = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                       rst_n;
  logic [2:0]                 push_cnt, pop_req, pop_cnt, avail;
  logic [PUSH_MAX-1:0][W-1:0] push_data;
  logic [POP_MAX-1:0][W-1:0]  head_data;
  logic [5:0]                 count;
  logic                       fetch_en;

  xt_prefetch_buffer #(.W(W), .DEPTH(DEPTH), .PUSH_MAX(PUSH_MAX), .POP_MAX(POP_MAX), .HEADROOM(HEADROOM)) dut (
    .clk(clk), .rst_n(rst_n), .push_cnt(push_cnt), .push_data(push_data), .pop_req(pop_req),
    .pop_cnt(pop_cnt), .head_data(head_data), .avail(avail), .count(count), .fetch_en(fetch_en));

  logic [W-1:0] ref_q[$];
  int unsigned checks = 0, failures = 0;
  int unsigned n_full = 0, n_throttle = 0, n_short = 0;
  logic [W-1:0] next_val = 32'h1000_0000;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // mode 0: random, 1: fill (push max, no pop), 2: drain (no push, pop max)
  task automatic one_cycle(int mode);
    int unsigned free, np, nreq, ngrant, exp_avail;
    free = DEPTH - ref_q.size();
    case (mode)
      1: begin np = (free < PUSH_MAX) ? free : PUSH_MAX; nreq = 0; end
      2: begin np = 0; nreq = POP_MAX; end
      default: begin
        np = $urandom() % (PUSH_MAX + 1);
        if (np > free) np = free;
        nreq = $urandom() % (POP_MAX + 1);
      end
    endcase
    push_cnt = 3'(np);
    pop_req  = 3'(nreq);
    for (int unsigned k = 0; k < PUSH_MAX; k++) push_data[k] = next_val + k;
    #1;
    exp_avail = (ref_q.size() < POP_MAX) ? ref_q.size() : POP_MAX;
    ngrant = (nreq < exp_avail) ? nreq : exp_avail;
    chk(avail == 3'(exp_avail), "avail");
    chk(pop_cnt == 3'(ngrant), "pop_cnt");
    chk(count == 6'(ref_q.size()), "count");
    chk(fetch_en == ((DEPTH - ref_q.size()) >= HEADROOM), "fetch_en");
    for (int unsigned k = 0; k < exp_avail; k++)
      chk(head_data[k] === ref_q[k], "head entry value/order");
    if (ref_q.size() == DEPTH) n_full++;
    if (!fetch_en) n_throttle++;
    if (nreq > exp_avail) n_short++;
    @(posedge clk);
    for (int unsigned k = 0; k < ngrant; k++) void'(ref_q.pop_front());
    for (int unsigned k = 0; k < np; k++) ref_q.push_back(next_val + k);
    next_val += PUSH_MAX;
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; push_cnt = '0; pop_req = '0; push_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Push-to-pop latency: one instruction, then ask for it in the next cycle.
    push_cnt = 3'd1; push_data[0] = 32'hCAFE_0001; pop_req = 3'd0;
    @(posedge clk); @(negedge clk);
    push_cnt = 3'd0; pop_req = 3'd1;
    #1 chk(avail == 3'd1 && pop_cnt == 3'd1 && head_data[0] == 32'hCAFE_0001, "push-to-pop latency one cycle");
    @(posedge clk); @(negedge clk);
    pop_req = 3'd0;
    #1 chk(count == 0, "empty after pop");
    repeat (12) one_cycle(1);
    repeat (12) one_cycle(2);
    for (int n = 0; n < 5000; n++) one_cycle((n % 200 < 15) ? 1 : ((n % 200 < 30) ? 2 : 0));
    chk(n_full > 0, "buffer never full");
    chk(n_throttle > 0, "fetch_en never dropped");
    chk(n_short > 0, "demand never exceeded contents");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
