// tb_xt_data_bus: the crosstalk-free bus used as a data bus: a 128-bit
// transfer carries two 64-bit data words on four 32-bit channels, and the
// receiving side serves two read ports (ISSUE = 2, 64-bit items).
//
// A memory model streams 2,000 transfers of data-like words (small integers,
// addresses, occasional random and 0101/1010 words); a consumer model takes
// 0..2 words per cycle. Checks: every word arrives once and in order, with
// its two 32-bit halves in place; no two adjacent bus wires switch in
// opposite directions; NOP insertion, deferral and words split across two
// bus cycles (one half sent, the other deferred) each happen. A watchdog
// bounds the run.
module tb_xt_data_bus;

  localparam int unsigned BUS_W = 128, DW = 64, WIRES = 135;
  localparam int unsigned TRANSFERS = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n;
  logic                 mem_valid, mem_ready, fetch_en;
  logic [BUS_W-1:0]     mem_data;
  logic [WIRES-1:0]     bus_wires, bus_prev;
  logic [1:0]           issue_req, issue_cnt, issue_avail;
  logic [1:0][DW-1:0]   issue_instr;
  logic [2:0]           stat_sent, stat_nops, stat_deferred;
  logic [1:0]           stat_assembled;
  logic [5:0]           stat_pf_count;

  xt_bus_system #(.INSTR_W(DW), .ISSUE(2)) dut (
    .clk(clk), .rst_n(rst_n),
    .mem_valid(mem_valid), .mem_ready(mem_ready), .mem_data(mem_data), .fetch_en(fetch_en),
    .bus_wires(bus_wires),
    .issue_req(issue_req), .issue_cnt(issue_cnt), .issue_instr(issue_instr), .issue_avail(issue_avail),
    .stat_sent(stat_sent), .stat_nops(stat_nops), .stat_deferred(stat_deferred),
    .stat_assembled(stat_assembled), .stat_pf_count(stat_pf_count));

  int unsigned checks = 0, failures = 0;
  logic [DW-1:0] sent_q[$];
  int unsigned   transfers = 0, received = 0;
  int unsigned   n_nop = 0, n_defer = 0, n_split = 0;

  function automatic logic [DW-1:0] gen_data(int unsigned n);
    case ($urandom() % 6)
      0: return DW'($urandom() % 1000);
      1: return -DW'($urandom() % 1000);
      2: return {32'h0000_7FFF, 16'h0, 16'($urandom()) & 16'hFFF8};
      3: return {$urandom(), $urandom()};
      4: return (n % 2 == 1) ? {2{32'h5555_5555}} : {2{32'hAAAA_AAAA}};
      default: return DW'(n * 8);
    endcase
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk) begin
    mem_valid <= rst_n && (transfers < TRANSFERS) && (($urandom() % 8) != 0);
    issue_req <= 2'($urandom() % 3);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (mem_valid && mem_ready) begin
        sent_q.push_back(mem_data[127:64]);
        sent_q.push_back(mem_data[63:0]);
        transfers <= transfers + 1;
        mem_data  <= {gen_data(2 * transfers + 2), gen_data(2 * transfers + 3)};
      end
      for (int unsigned k = 0; k < 2; k++)
        if (k < issue_cnt) begin
          chk(sent_q.size() != 0 && issue_instr[k] === sent_q.pop_front(), "data word order or value");
          received++;
        end
      for (int unsigned b = 0; b + 1 < WIRES; b++)
        if (bus_prev[b] != bus_wires[b] && bus_prev[b+1] != bus_wires[b+1] && bus_wires[b] != bus_wires[b+1])
          chk(1'b0, "opposite switching on adjacent bus wires");
      bus_prev <= bus_wires;
      if (stat_nops != 0) n_nop++;
      if (stat_deferred != 0) n_defer++;
      if (stat_sent % 2 == 1) n_split++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    mem_data = {gen_data(0), gen_data(1)};
    repeat (3) @(negedge clk);
    bus_prev = bus_wires;
    rst_n = 1'b1;
    while (transfers < TRANSFERS) @(negedge clk);
    repeat (200) @(negedge clk);
    chk(received == 2 * TRANSFERS, "all data words received");
    chk(n_nop > 0, "NOP insertion never happened");
    chk(n_defer > 0, "deferral never happened");
    chk(n_split > 0, "no word was split across bus cycles");
    $display("transfers %0d, words %0d; cycles with NOP insertion %0d, deferral %0d, odd segment count %0d",
             transfers, received, n_nop, n_defer, n_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
