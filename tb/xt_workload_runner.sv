// xt_workload_runner: runs one instruction stream through an xt_bus_system
// and reports how many cycles a processor model needed to consume it
// (testbench helper).
//
// The processor model works through a fixed list of demand steps: at step s it
// needs dem[s] instructions (0..4); it asks for what is still missing each
// cycle and moves to the next step once the step is served. The run ends when
// all WORDS * 4 instructions have been issued. The list is the
// same for every runner in a test, so two runners differ only in how the bus
// delivered the instructions. When CONST_PROG is 0 the memory sends a program
// made by gen_instr (the generator is seeded with SEED); when CONST_PROG is 1 every word is the same,
// so nothing ever switches and the bus never inserts a NOP: that runner is the
// reference without crosstalk penalty. The memory offers a word whenever the
// fetch logic lets it (fetch runs ahead of commit). Order and values of the
// issued instructions are checked against the program. For the power view it
// also counts, on a plain BUS_W-wire bus carrying the same words back to back,
// the wire transitions (transition toggles) and adjacent opposite pairs
// (coupling toggles), and the same two counts on the encoded bus.
module xt_workload_runner #(
  parameter int unsigned CH_W       = 32,
  parameter bit          CONST_PROG = 1'b0,
  parameter int unsigned WORDS      = 4000,
  parameter int unsigned SEED       = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  dem [WORDS * 4],
  output logic        done,
  output int unsigned cycles,
  output int unsigned undesirable_bits,   // on a plain bus carrying the same words
  output int unsigned plain_ttoggle,      // wire transitions on that plain bus
  output int unsigned enc_ttoggle,        // wire transitions on the encoded bus
  output int unsigned enc_ctoggle,        // opposite pairs on the encoded bus (must stay 0)
  output int unsigned checks,
  output int unsigned failures
);

  import xt_tb_pkg::*;

  localparam int unsigned BUS_W = 128;
  localparam int unsigned N     = BUS_W / CH_W;
  localparam int unsigned WIRES = BUS_W + 2 * N - 1;
  localparam int unsigned CNT_W = $clog2(N + 1);

  logic              mem_valid, mem_ready, fetch_en;
  logic [BUS_W-1:0]  mem_data, prev_word;
  logic [WIRES-1:0]  bus_wires, bus_prev;
  logic [2:0]        issue_req, issue_cnt, issue_avail;
  logic [3:0][31:0]  issue_instr;
  logic [CNT_W-1:0]  stat_sent, stat_nops, stat_deferred;
  logic [2:0]        stat_assembled;
  logic [5:0]        stat_pf_count;

  xt_bus_system #(.CH_W(CH_W)) dut (
    .clk(clk), .rst_n(rst_n),
    .mem_valid(mem_valid), .mem_ready(mem_ready), .mem_data(mem_data), .fetch_en(fetch_en),
    .bus_wires(bus_wires),
    .issue_req(issue_req), .issue_cnt(issue_cnt), .issue_instr(issue_instr), .issue_avail(issue_avail),
    .stat_sent(stat_sent), .stat_nops(stat_nops), .stat_deferred(stat_deferred),
    .stat_assembled(stat_assembled), .stat_pf_count(stat_pf_count));

  logic [31:0]  prog_q[$];
  int unsigned  words = 0, step = 0, got = 0, issued = 0;
  bit           seeded = 1'b0;

  function automatic logic [BUS_W-1:0] next_prog_word();
    logic [BUS_W-1:0] w;
    for (int unsigned k = 0; k < 4; k++)
      w[BUS_W - 1 - 32 * k -: 32] = CONST_PROG ? 32'h8C43_0010 : gen_instr();
    return w;
  endfunction

  function automatic int unsigned count_undesirable(logic [BUS_W-1:0] p, logic [BUS_W-1:0] c);
    int unsigned n = 0;
    for (int unsigned k = 0; k + 1 < BUS_W; k++)
      if (p[k] != c[k] && p[k+1] != c[k+1] && c[k] != c[k+1]) n++;
    return n;
  endfunction

  assign mem_valid = rst_n && (words < WORDS);

  always_comb begin
    int unsigned need;
    need = (step < WORDS * 4) ? int'(dem[step]) - got : 0;
    if (need > WORDS * 4 - issued) need = WORDS * 4 - issued;
    issue_req = 3'(need);
  end

  initial begin
    done = 1'b0; cycles = 0; undesirable_bits = 0; checks = 0; failures = 0;
    plain_ttoggle = 0; enc_ttoggle = 0; enc_ctoggle = 0;
    prev_word = '0;
    void'($urandom(SEED));
    mem_data = next_prog_word();
  end

  function automatic int unsigned count_pairs(logic [WIRES-1:0] p, logic [WIRES-1:0] c);
    int unsigned n = 0;
    for (int unsigned k = 0; k + 1 < WIRES; k++)
      if (p[k] != c[k] && p[k+1] != c[k+1] && c[k] != c[k+1]) n++;
    return n;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) bus_prev <= bus_wires;
    if (rst_n && !done) begin
      cycles <= cycles + 1;
      enc_ttoggle <= enc_ttoggle + $countones(bus_prev ^ bus_wires);
      enc_ctoggle <= enc_ctoggle + count_pairs(bus_prev, bus_wires);
      bus_prev    <= bus_wires;
      if (mem_valid && mem_ready) begin
        for (int unsigned k = 0; k < 4; k++) prog_q.push_back(mem_data[BUS_W - 1 - 32 * k -: 32]);
        undesirable_bits <= undesirable_bits + count_undesirable(prev_word, mem_data);
        plain_ttoggle    <= plain_ttoggle + $countones(prev_word ^ mem_data);
        prev_word <= mem_data;
        words <= words + 1;
        mem_data <= next_prog_word();
      end
      for (int unsigned k = 0; k < 4; k++)
        if (k < issue_cnt) begin
          checks++;
          if (prog_q.size() == 0 || issue_instr[k] !== prog_q.pop_front()) failures++;
        end
      issued <= issued + int'(issue_cnt);
      if (issued + int'(issue_cnt) == WORDS * 4) done <= 1'b1;
      if (int'(issue_cnt) + got == int'(dem[step])) begin
        // step served (a step of 0 is a cycle without commit)
        step <= step + 1;
        got  <= 0;
      end else begin
        got <= got + int'(issue_cnt);
      end
    end
  end

endmodule
