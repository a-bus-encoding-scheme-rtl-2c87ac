// tb_xt_bus_system: end-to-end test of the crosstalk-free instruction bus at
// its default sizes (128-bit bus, 32-bit channels, 32-entry prefetch buffer).
//
// A memory model streams a program of NUM_WORDS fetch words, four 32-bit
// instructions each, on the mem_valid/mem_ready handshake, with occasional
// idle cycles. A processor model asks for 0..4 instructions per cycle. The
// program mixes instruction-like words (gen_instr), hostile 0101/1010 words
// that force NOP segments and deferrals, and a phase in which the processor
// stops asking so that the prefetch buffer fills and fetch_en throttles the
// memory. Checks:
//   * every instruction reaches the processor once, in program order;
//   * no two adjacent bus wires ever switch in opposite directions;
//   * first-word latency: accepted at edge k, issuable in the cycle after
//     edge k+3;
//   * a conflict-free stream with a processor taking four per cycle runs at
//     one word per cycle.
// Mechanisms counted, each must happen at least once: NOP insertion, deferral
// to the next cycle, all-NOP bus cycle, deassembler back-pressure, fetch_en
// throttling, processor demand larger than the buffer contents.
module tb_xt_bus_system;

  import xt_tb_pkg::*;

  localparam int unsigned BUS_W = 128, CH_W = 32, N = 4, WIRES = 135;
  localparam int unsigned NUM_WORDS = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                  rst_n;
  logic                  mem_valid, mem_ready, fetch_en;
  logic [BUS_W-1:0]      mem_data;
  logic [WIRES-1:0]      bus_wires, bus_prev;
  logic [2:0]            issue_req, issue_cnt, issue_avail;
  logic [3:0][31:0]      issue_instr;
  logic [2:0]            stat_sent, stat_nops, stat_deferred, stat_assembled;
  logic [5:0]            stat_pf_count;

  xt_bus_system dut (
    .clk(clk), .rst_n(rst_n),
    .mem_valid(mem_valid), .mem_ready(mem_ready), .mem_data(mem_data), .fetch_en(fetch_en),
    .bus_wires(bus_wires),
    .issue_req(issue_req), .issue_cnt(issue_cnt), .issue_instr(issue_instr), .issue_avail(issue_avail),
    .stat_sent(stat_sent), .stat_nops(stat_nops), .stat_deferred(stat_deferred),
    .stat_assembled(stat_assembled), .stat_pf_count(stat_pf_count));

  int unsigned checks = 0, failures = 0;
  logic [31:0] program_q[$];   // instructions sent, not yet issued
  int unsigned words_sent = 0, instr_issued = 0;
  int unsigned n_nop = 0, n_defer = 0, n_all_nop = 0, n_backpressure = 0, n_throttle = 0, n_starve = 0;
  int unsigned phase = 0;      // 0 latency, 1 streaming, 2 mixed, 3 stalled processor
  bit          mem_on = 1'b0;
  bit          single = 1'b0;
  logic [BUS_W-1:0] next_word;   // offer one word outside the streaming phases

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [BUS_W-1:0] make_word(int unsigned w);
    logic [BUS_W-1:0] d;
    if (phase == 1) return {4{32'h2408_0004}};
    for (int unsigned k = 0; k < 4; k++)
      d[BUS_W - 1 - 32 * k -: 32] = ((w % 50) < 5) ? gen_hostile(w + k) : gen_instr();
    return d;
  endfunction

  // Memory model: offers the next word while mem_on is set, with random idle
  // cycles outside the streaming phase; single offers one word on its own.
  bit mem_rand;
  always @(negedge clk) mem_rand <= (phase == 1) || (($urandom() % 10) != 0);
  always_comb mem_valid = mem_on ? mem_rand : single;
  always_comb mem_data = next_word;

  always @(posedge clk) begin
    if (rst_n && mem_valid && mem_ready) begin
      for (int unsigned k = 0; k < 4; k++) program_q.push_back(next_word[BUS_W - 1 - 32 * k -: 32]);
      words_sent++;
      next_word <= make_word(words_sent);
    end
  end

  // Processor model: random demand, checks order.
  always @(negedge clk) begin
    case (phase)
      1:       issue_req <= 3'd4;
      3:       issue_req <= 3'd0;
      default: issue_req <= 3'($urandom() % 5);
    endcase
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int unsigned k = 0; k < 4; k++) begin
        if (k < issue_cnt) begin
          if (program_q.size() == 0) chk(1'b0, "issued an instruction that was never fetched");
          else chk(issue_instr[k] === program_q.pop_front(), "instruction order or value");
          instr_issued++;
        end
      end
      // bus rule, checked here independently of the RTL assertion
      for (int unsigned b = 0; b + 1 < WIRES; b++)
        if (bus_prev[b] != bus_wires[b] && bus_prev[b+1] != bus_wires[b+1] && bus_wires[b] != bus_wires[b+1])
          chk(1'b0, "opposite switching on adjacent bus wires");
      bus_prev <= bus_wires;
      if (stat_nops != 0) n_nop++;
      if (stat_deferred != 0) n_defer++;
      if (stat_sent == 0 && stat_deferred != 0) n_all_nop++;
      if (mem_valid && fetch_en && !mem_ready) n_backpressure++;
      if (mem_valid && !fetch_en) n_throttle++;
      if (issue_req > issue_avail) n_starve++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned t0, w0;
    rst_n = 1'b0; issue_req = '0;
    next_word = 128'h0123_4567_89AB_CDEF_0246_8ACE_1357_9BDF;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    bus_prev = bus_wires;
    @(negedge clk);

    // Phase 0: latency of a single word.
    phase = 0;
    single = 1'b1;
    #1 chk(mem_valid && mem_ready, "ready after reset");
    @(posedge clk);                       // edge k: accepted
    @(negedge clk);
    single = 1'b0;
    @(posedge clk); @(negedge clk);       // k+1: on the bus
    chk(issue_avail == 0, "latency: not yet issuable after edge k+1");
    @(posedge clk); @(negedge clk);       // k+2: out of the assembler
    chk(issue_avail == 0, "latency: not yet issuable after edge k+2");
    @(posedge clk); @(negedge clk);       // k+3: in the prefetch buffer
    chk(issue_avail == 3'd4, "latency: issuable after edge k+3");
    repeat (10) @(negedge clk);

    // Phase 1: conflict-free stream at full rate (identical words never switch).
    phase = 1;
    next_word = {4{32'h2408_0004}};
    @(negedge clk);
    mem_on = 1'b1;
    w0 = words_sent;
    t0 = 0;
    repeat (200) begin
      @(posedge clk);
      if (mem_valid && mem_ready) t0++;
    end
    chk(t0 >= 198, "throughput: one word per cycle when nothing conflicts");
    $display("stream: %0d words in 200 cycles", t0);
    @(negedge clk);

    // Phase 2: mixed program with random demand.
    phase = 2;
    while (words_sent < NUM_WORDS / 2) @(negedge clk);
    // Phase 3: processor stalls, buffer fills, fetch_en drops.
    phase = 3;
    repeat (60) @(negedge clk);
    chk(!fetch_en, "fetch_en low while the processor stalls");
    phase = 2;
    while (words_sent < NUM_WORDS) @(negedge clk);
    mem_on = 1'b0;
    phase = 1;
    repeat (100) @(negedge clk);
    chk(program_q.size() == 0, "all fetched instructions reached the processor");

    chk(n_nop > 0, "NOP insertion never happened");
    chk(n_defer > 0, "deferral never happened");
    chk(n_all_nop > 0, "all-NOP cycle never happened");
    chk(n_backpressure > 0, "deassembler back-pressure never happened");
    chk(n_throttle > 0, "fetch_en throttling never happened");
    chk(n_starve > 0, "processor demand never exceeded the buffer");
    $display("words %0d, instructions issued %0d; cycles with NOP insertion %0d, deferral %0d, all-NOP %0d, back-pressure %0d, throttled %0d, starved %0d",
             words_sent, instr_issued, n_nop, n_defer, n_all_nop, n_backpressure, n_throttle, n_starve);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
