// xt_bus_system: crosstalk-free instruction bus between memory and prefetch unit.
//
// A long, wide on-chip bus is slowed most when two neighbouring wires switch
// in opposite directions. This top joins the three parts that remove those
// transitions:
//   memory side    xt_deassembler: cuts each BUS_W-bit fetch word into
//                  channels, inserts NOP segments and defers segments so that
//                  no channel sees an opposite switching pair, and drives the
//                  BUS_W + 2N - 1 wire bus (distinction and separation wires);
//   bus            bus_wires, brought out so the wires can be observed;
//   prefetch side  xt_assembler removes the NOP segments and rebuilds the
//                  instructions, xt_prefetch_buffer holds them until the
//                  processor asks for them.
// The memory array and the processor are outside this module: the memory
// offers words on mem_valid/mem_data/mem_ready, and the processor takes up to
// ISSUE instructions per cycle with issue_req/issue_cnt/issue_instr.
//
// Flow control: the bus itself has no stall wire. fetch_en, a side signal from
// the prefetch buffer, lets the memory start a new word only while the buffer
// has room for everything that can still be in flight (4 words' worth of
// instructions: the deassembler queue of two words, the new word, the bus and
// the assembler register). mem_ready is the deassembler's ready gated with it.
//
// Timing with no conflicts: a word accepted at edge k is on the bus after edge
// k+1, its instructions leave the assembler after edge k+2 and can be issued
// from the prefetch buffer in the cycle after edge k+3.
//
// An assertion checks the bus rule itself: between two consecutive cycles no
// two adjacent wires of bus_wires switch in opposite directions.
//
// Default sizes are the main configuration of the scheme: 128-bit bus, 32-bit
// channels, 32-bit instructions, four-issue processor. The prefetch depth and
// the flow control are this design's own.
module xt_bus_system
  import xt_pkg::*;
#(
  parameter int unsigned BUS_W    = DEF_BUS_W,
  parameter int unsigned CH_W     = DEF_CH_W,
  parameter int unsigned INSTR_W  = DEF_INSTR_W,
  parameter bit          NOP_ONES = 1'b0,
  parameter int unsigned PF_DEPTH = 32,
  parameter int unsigned ISSUE    = 4,
  localparam int unsigned N       = BUS_W / CH_W,
  localparam int unsigned WIRES   = BUS_W + 2 * N - 1,
  localparam int unsigned SPI     = INSTR_W / CH_W,
  localparam int unsigned MAXI    = N / SPI,
  localparam int unsigned CNT_W   = $clog2(N + 1),
  localparam int unsigned OCNT_W  = $clog2(MAXI + 1),
  localparam int unsigned PO_W    = $clog2(ISSUE + 1),
  localparam int unsigned PFC_W   = $clog2(PF_DEPTH + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // memory side
  input  logic                          mem_valid,
  output logic                          mem_ready,
  input  logic [BUS_W-1:0]              mem_data,
  output logic                          fetch_en,
  // the physical bus
  output logic [WIRES-1:0]              bus_wires,
  // processor side
  input  logic [PO_W-1:0]               issue_req,
  output logic [PO_W-1:0]               issue_cnt,
  output logic [ISSUE-1:0][INSTR_W-1:0] issue_instr,
  output logic [PO_W-1:0]               issue_avail,
  // activity, per cycle
  output logic [CNT_W-1:0]              stat_sent,      // data segments driven next edge
  output logic [CNT_W-1:0]              stat_nops,      // NOP segments inserted next edge
  output logic [CNT_W-1:0]              stat_deferred,  // segments pushed to a later cycle
  output logic [OCNT_W-1:0]             stat_assembled, // instructions completed
  output logic [PFC_W-1:0]              stat_pf_count   // prefetch buffer fill
);

  logic                          des_ready;
  logic [OCNT_W-1:0]             asm_cnt;
  logic [MAXI-1:0][INSTR_W-1:0]  asm_instr;
  logic [CNT_W-1:0]              asm_nops;

  assign mem_ready = des_ready && fetch_en;

  xt_deassembler #(.BUS_W(BUS_W), .CH_W(CH_W), .NOP_ONES(NOP_ONES)) u_deassembler (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (mem_valid && fetch_en),
    .in_ready     (des_ready),
    .in_data      (mem_data),
    .bus_o        (bus_wires),
    .sent_cnt     (stat_sent),
    .nop_cnt      (stat_nops),
    .deferred_cnt (stat_deferred)
  );

  xt_assembler #(.BUS_W(BUS_W), .CH_W(CH_W), .INSTR_W(INSTR_W), .NOP_ONES(NOP_ONES)) u_assembler (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_i     (bus_wires),
    .out_cnt   (asm_cnt),
    .out_instr (asm_instr),
    .out_nops  (asm_nops)
  );

  xt_prefetch_buffer #(
    .W        (INSTR_W),
    .DEPTH    (PF_DEPTH),
    .PUSH_MAX (MAXI),
    .POP_MAX  (ISSUE),
    .HEADROOM (4 * MAXI)
  ) u_prefetch (
    .clk       (clk),
    .rst_n     (rst_n),
    .push_cnt  (asm_cnt),
    .push_data (asm_instr),
    .pop_req   (issue_req),
    .pop_cnt   (issue_cnt),
    .head_data (issue_instr),
    .avail     (issue_avail),
    .count     (stat_pf_count),
    .fetch_en  (fetch_en)
  );

  assign stat_assembled = asm_cnt;

  // The bus rule: no adjacent pair of wires switches in opposite directions.
  function automatic logic opposite_switch(logic [WIRES-1:0] p, logic [WIRES-1:0] c);
    logic [WIRES-1:0] rise, fall;
    rise = ~p & c;
    fall = p & ~c;
    return |((rise[WIRES-1:1] & fall[WIRES-2:0]) | (fall[WIRES-1:1] & rise[WIRES-2:0]));
  endfunction

  a_crosstalk_free: assert property (@(posedge clk) disable iff (!rst_n)
    !opposite_switch($past(bus_wires), bus_wires))
    else $error("xt_bus_system: undesirable pattern on the bus");

  // Every NOP segment inserted at the sending end is removed at the receiving end.
  a_nops_removed: assert property (@(posedge clk) disable iff (!rst_n)
    $past(stat_nops, 2) <= asm_nops)
    else $error("xt_bus_system: assembler removed fewer NOP segments than were inserted");

endmodule
