// xt_assembler_checker: drives one xt_assembler with bus words and checks the
// instructions it rebuilds (testbench helper).
//
// Every cycle a random set of channels carries data segments (the others NOP
// segments with the NOP level on the data wires, to show that the distinction
// wire alone decides). The checker keeps the stream of data segments it put
// on the bus; every INSTR_W/CH_W of them form one instruction, first segment
// most significant. One cycle after a bus word, out_cnt must equal the number
// of instructions completed by that word and out_instr must hold them in
// order; out_nops must equal the NOP segments of that word. Phases with
// all-NOP words and all-data words are included. It counts cycles in which an
// incomplete instruction was carried over and fails if none was (when an
// instruction spans several segments).
module xt_assembler_checker #(
  parameter int unsigned BUS_W    = 128,
  parameter int unsigned CH_W     = 32,
  parameter int unsigned INSTR_W  = 32,
  parameter bit          NOP_ONES = 1'b0,
  parameter int unsigned CYCLES   = 3000
) (
  input  logic        clk,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);

  localparam int unsigned N      = BUS_W / CH_W;
  localparam int unsigned WIRES  = BUS_W + 2 * N - 1;
  localparam int unsigned SPI    = INSTR_W / CH_W;
  localparam int unsigned MAXI   = N / SPI;
  localparam int unsigned CNT_W  = $clog2(N + 1);
  localparam int unsigned OCNT_W = $clog2(MAXI + 1);
  typedef logic [CH_W-1:0] seg_t;

  logic                          rst_n;
  logic [WIRES-1:0]              bus_i;
  logic [OCNT_W-1:0]             out_cnt;
  logic [MAXI-1:0][INSTR_W-1:0]  out_instr;
  logic [CNT_W-1:0]              out_nops;

  xt_assembler #(.BUS_W(BUS_W), .CH_W(CH_W), .INSTR_W(INSTR_W), .NOP_ONES(NOP_ONES)) dut (
    .clk(clk), .rst_n(rst_n), .bus_i(bus_i), .out_cnt(out_cnt), .out_instr(out_instr), .out_nops(out_nops));

  seg_t        pending[$];   // data segments not yet part of a full instruction
  int unsigned n_carry = 0, n_full = 0, n_empty = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [%0d/%0d/%0d] %s at %0t", BUS_W, CH_W, INSTR_W, what, $time);
    end
  endtask

  // mode 0: random mask, 1: all NOP, 2: all data
  task automatic one_cycle(int mode);
    logic [N-1:0] dmask;
    int unsigned pos, nn, ndata, exp_cnt;
    logic [INSTR_W-1:0] exp_instr [MAXI];
    seg_t s;
    case (mode)
      1: dmask = '0;
      2: dmask = '1;
      default: dmask = N'($urandom());
    endcase
    bus_i = {WIRES{NOP_ONES}};
    pos = WIRES;
    nn = 0; ndata = 0;
    for (int unsigned c = 0; c < N; c++) begin
      s = dmask[c] ? seg_t'($urandom()) : {CH_W{NOP_ONES}};
      if (dmask[c] && ($urandom() % 10 == 0)) s = {CH_W{NOP_ONES}};  // data equal to the NOP level
      for (int unsigned k = 0; k < CH_W; k++) bus_i[pos - 1 - k] = s[CH_W - 1 - k];
      bus_i[pos - 1 - CH_W] = dmask[c] ^ NOP_ONES;
      pos -= CH_W + 2;
      if (dmask[c]) begin pending.push_back(s); ndata++; end else nn++;
    end
    exp_cnt = 0;
    while (pending.size() >= SPI) begin
      for (int unsigned k = 0; k < SPI; k++)
        exp_instr[exp_cnt][INSTR_W - 1 - k * CH_W -: CH_W] = pending.pop_front();
      exp_cnt++;
    end
    if (pending.size() != 0) n_carry++;
    if (ndata == N) n_full++;
    if (ndata == 0) n_empty++;
    @(posedge clk);
    #1;
    chk(out_cnt == OCNT_W'(exp_cnt), "completed-instruction count");
    chk(out_nops == CNT_W'(nn), "NOP segment count");
    for (int unsigned m = 0; m < exp_cnt; m++)
      chk(out_instr[m] === exp_instr[m], "instruction value or order");
    @(negedge clk);
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0;
    bus_i = {WIRES{NOP_ONES}};
    repeat (2) @(negedge clk);
    #1 chk(out_cnt == 0, "reset count");
    rst_n = 1'b1;
    @(negedge clk);
    repeat (5) one_cycle(1);
    repeat (20) one_cycle(2);
    for (int unsigned n = 0; n < CYCLES; n++) one_cycle(($urandom() % 10 == 0) ? 1 : 0);
    chk(n_full > 0 && n_empty > 0, "all-data and all-NOP words seen");
    if (SPI > 1) chk(n_carry > 0, "incomplete instruction never carried over");
    $display("[%0d/%0d/%0d] carry-over cycles %0d, full words %0d, empty words %0d", BUS_W, CH_W, INSTR_W, n_carry, n_full, n_empty);
    done = 1'b1;
  end

endmodule
