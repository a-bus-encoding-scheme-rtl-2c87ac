// xt_deassembler_checker: drives one xt_deassembler and checks it against a
// cycle-accurate reference model (testbench helper).
//
// The reference keeps its own segment queue and its own copy of what each
// channel carried last cycle, and places the pending segments one after the
// other: a segment goes on the first channel, at or after the channel
// following the previous segment, whose previous content gives no opposite
// switching pair; channels skipped carry NOP; segments that reach past the last
// channel wait for the next cycle. The physical wire order is rebuilt here
// from the layout rule (channel, distinction wire, separation wire).
//
// Besides the exact bus value it checks, independently of the model:
//   * no two adjacent bus wires switch in opposite directions;
//   * decoding the bus by its distinction wires returns the words' segments
//     in order, none lost or repeated;
//   * latency: a word accepted into an empty deassembler is on the bus after
//     the next edge; throughput: a conflict-free stream moves a word per cycle;
//   * worst case: a first segment that conflicts with every channel gives one
//     all-NOP cycle, after which the whole word goes out.
// It counts the mechanisms seen (NOP insertion, deferral, all-NOP cycle,
// back-pressure) and fails if one never happened.
module xt_deassembler_checker #(
  parameter int unsigned BUS_W    = 128,
  parameter int unsigned CH_W     = 32,
  parameter bit          NOP_ONES = 1'b0,
  parameter int unsigned RANDOM_CYCLES = 4000
) (
  input  logic        clk,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);

  localparam int unsigned N     = BUS_W / CH_W;
  localparam int unsigned WIRES = BUS_W + 2 * N - 1;
  localparam int unsigned CNT_W = $clog2(N + 1);
  typedef logic [CH_W-1:0] seg_t;
  localparam seg_t NOP = {CH_W{NOP_ONES}};

  logic              rst_n;
  logic              in_valid, in_ready;
  logic [BUS_W-1:0]  in_data;
  logic [WIRES-1:0]  bus_o, bus_prev;
  logic [CNT_W-1:0]  sent_cnt, nop_cnt, deferred_cnt;

  xt_deassembler #(.BUS_W(BUS_W), .CH_W(CH_W), .NOP_ONES(NOP_ONES)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .bus_o(bus_o), .sent_cnt(sent_cnt), .nop_cnt(nop_cnt), .deferred_cnt(deferred_cnt));

  // ---------------- reference model ----------------
  seg_t m_q[$];
  seg_t m_reg [N];
  bit   m_data[N];
  seg_t sb[$];          // scoreboard: segments accepted, not yet seen on the bus

  int unsigned n_nop_insert = 0, n_defer = 0, n_all_nop = 0, n_backpressure = 0, n_words = 0;

  function automatic bit opposite(logic [WIRES-1:0] p, logic [WIRES-1:0] c, int unsigned lo, int unsigned hi);
    for (int unsigned k = lo; k < hi; k++)
      if (p[k] != c[k] && p[k+1] != c[k+1] && c[k] != c[k+1]) return 1'b1;
    return 1'b0;
  endfunction

  function automatic bit seg_conflict(seg_t p, seg_t c);
    for (int unsigned k = 0; k + 1 < CH_W; k++)
      if (p[k] != c[k] && p[k+1] != c[k+1] && c[k] != c[k+1]) return 1'b1;
    return 1'b0;
  endfunction

  function automatic logic [WIRES-1:0] model_bus();
    logic [WIRES-1:0] b;
    int unsigned pos;
    pos = WIRES;
    for (int unsigned c = 0; c < N; c++) begin
      for (int unsigned k = 0; k < CH_W; k++) b[pos - 1 - k] = m_reg[c][CH_W - 1 - k];
      pos -= CH_W;
      b[pos - 1] = m_data[c] ^ NOP_ONES;            // distinction wire
      pos -= 1;
      if (c != N - 1) begin b[pos - 1] = NOP_ONES; pos -= 1; end  // separation wire
    end
    return b;
  endfunction

  // One clock edge of the model; returns what was accepted.
  task automatic model_step(bit valid, logic [BUS_W-1:0] data, output bit accepted);
    int unsigned p, wc;
    seg_t nreg [N];
    bit   ndat [N];
    accepted = valid && (m_q.size() <= N);
    wc = (m_q.size() < N) ? m_q.size() : N;
    p = 0;
    for (int unsigned i = 0; i < N; i++) begin
      if (p < wc && !seg_conflict(m_reg[i], m_q[p])) begin
        nreg[i] = m_q[p]; ndat[i] = 1'b1; p++;
      end else begin
        nreg[i] = NOP; ndat[i] = 1'b0;
      end
    end
    for (int unsigned i = 0; i < p; i++) void'(m_q.pop_front());
    for (int unsigned i = 0; i < N; i++) begin m_reg[i] = nreg[i]; m_data[i] = ndat[i]; end
    if (accepted)
      for (int unsigned k = 0; k < N; k++) begin
        m_q.push_back(data[BUS_W - 1 - k * CH_W -: CH_W]);
        sb.push_back(data[BUS_W - 1 - k * CH_W -: CH_W]);
      end
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [%0d/%0d] %s at %0t", BUS_W, CH_W, what, $time);
    end
  endtask

  // Check the DUT after an edge, against the model and the scoreboard.
  task automatic check_bus();
    logic [WIRES-1:0] exp;
    int unsigned pos;
    exp = model_bus();
    chk(bus_o === exp, "bus value differs from the reference");
    chk(!opposite(bus_prev, bus_o, 0, WIRES - 1), "undesirable pattern on the bus");
    // decode by distinction wires
    pos = WIRES;
    for (int unsigned c = 0; c < N; c++) begin
      seg_t s;
      bit   d;
      s = bus_o[pos - 1 -: CH_W];
      d = bus_o[pos - 1 - CH_W] ^ NOP_ONES;
      pos -= CH_W + 2;
      if (d) begin
        if (sb.size() == 0) chk(1'b0, "data segment that was never sent");
        else chk(s === sb.pop_front(), "segment out of order or corrupted");
      end else begin
        chk(s === NOP, "NOP segment not all NOP level");
      end
    end
    bus_prev = bus_o;
  endtask

  // A full clock cycle: drive, model, edge, check.
  task automatic cycle(bit valid, logic [BUS_W-1:0] data, output bit accepted);
    in_valid = valid;
    in_data  = data;
    #1;
    chk(in_ready === (m_q.size() <= N), "in_ready differs from the reference");
    chk(sent_cnt + deferred_cnt == CNT_W'((m_q.size() < N) ? m_q.size() : N), "sent + deferred != window");
    if (nop_cnt != 0) n_nop_insert++;
    if (deferred_cnt != 0) n_defer++;
    if (m_q.size() > 0 && sent_cnt == 0) n_all_nop++;
    if (valid && !in_ready) n_backpressure++;
    @(posedge clk);
    model_step(valid, data, accepted);
    if (accepted) n_words++;
    #1;
    check_bus();
    @(negedge clk);
  endtask

  function automatic logic [BUS_W-1:0] fill(seg_t s);
    logic [BUS_W-1:0] w;
    for (int unsigned k = 0; k < N; k++) w[k * CH_W +: CH_W] = s;
    return w;
  endfunction

  function automatic seg_t pick_seg();
    case ($urandom() % 8)
      0: return {(CH_W/2){2'b01}};
      1: return {(CH_W/2){2'b10}};
      2: return '0;
      3: return '1;
      4: return {(CH_W/4){4'b0011}};
      5: return {(CH_W/4){4'b1100}};
      default: return CH_W'($urandom());
    endcase
  endfunction

  initial begin
    bit acc;
    logic [BUS_W-1:0] w;
    int unsigned t0;
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; in_valid = 1'b0; in_data = '0;
    for (int unsigned i = 0; i < N; i++) begin m_reg[i] = NOP; m_data[i] = 1'b0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    bus_prev = model_bus();
    #1 chk(bus_o === bus_prev, "reset value of the bus");

    // Latency: one word into the empty deassembler.
    w = {BUS_W/32{32'h1357_9BDF}};
    cycle(1'b1, w, acc);            // accepted at this edge
    chk(acc, "first word accepted");
    cycle(1'b0, '0, acc);           // on the bus after the next edge
    for (int unsigned c = 0; c < N; c++)
      chk(bus_o[WIRES - 1 - c * (CH_W + 2) - CH_W] == !NOP_ONES, "latency: word on the bus one cycle after acceptance");
    repeat (3) cycle(1'b0, '0, acc);

    // Throughput: conflict-free stream (random words separated by NOP-level words).
    t0 = n_words;
    for (int unsigned n = 0; n < 40; n++) begin
      w = (n % 2 == 1) ? fill(NOP) : {BUS_W/32{$urandom()}};
      cycle(1'b1, w, acc);
      chk(acc, "throughput: conflict-free word not accepted in its cycle");
    end
    chk(n_words - t0 == 40, "throughput: 40 words in 40 cycles");
    repeat (3) cycle(1'b0, '0, acc);

    // Worst case: all channels carry 0101..., next word starts with 1010...
    cycle(1'b1, fill({(CH_W/2){2'b01}}), acc);
    cycle(1'b1, fill({(CH_W/2){2'b10}}), acc);
    cycle(1'b0, '0, acc);
    for (int unsigned c = 0; c < N; c++)
      chk(bus_o[WIRES - 1 - c * (CH_W + 2) - CH_W] == NOP_ONES, "worst case: all-NOP cycle");
    cycle(1'b0, '0, acc);
    for (int unsigned c = 0; c < N; c++)
      chk(bus_o[WIRES - 1 - c * (CH_W + 2) - CH_W] == !NOP_ONES, "worst case: full word one cycle later");
    repeat (3) cycle(1'b0, '0, acc);

    // Random traffic with conflict-prone segments and idle gaps.
    for (int unsigned n = 0; n < RANDOM_CYCLES; n++) begin
      for (int unsigned k = 0; k < N; k++) w[k * CH_W +: CH_W] = pick_seg();
      cycle(($urandom() % 8) != 0, w, acc);
    end
    repeat (2 * N) cycle(1'b0, '0, acc);
    chk(sb.size() == 0, "segments never delivered");

    chk(n_nop_insert > 0, "NOP insertion never happened");
    chk(n_defer > 0, "deferral to the next cycle never happened");
    chk(n_all_nop > 0, "all-NOP cycle never happened");
    chk(n_backpressure > 0, "back-pressure never happened");
    $display("[%0d/%0d] words %0d, NOP-insert cycles %0d, deferral cycles %0d, all-NOP cycles %0d, back-pressure %0d",
             BUS_W, CH_W, n_words, n_nop_insert, n_defer, n_all_nop, n_backpressure);
    done = 1'b1;
  end

endmodule
