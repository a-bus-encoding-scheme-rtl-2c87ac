// xt_prefetch_buffer: instruction buffer of the prefetch unit.
//
// The assembler delivers up to PUSH_MAX completed instructions per cycle; the
// processor takes up to POP_MAX per cycle on demand. Because fetching runs
// ahead of execution, the buffer usually holds instructions before they are
// needed, which is what lets the bus spend an occasional cycle on NOP segments
// without slowing the processor.
//
// Circular buffer of DEPTH entries (a power of two) with read and write
// pointers. The bus has no stall wire, so the buffer tells the memory side
// when it may start another word with fetch_en: it is high while at least
// HEADROOM entries are free, where HEADROOM covers every instruction that can
// still be on its way (deassembler queue, bus, assembler) plus the new word.
// An assertion checks that a push never overflows the buffer.
//
// Interface and timing: push_cnt/push_data are written at the rising edge.
// head_data[0..avail-1] shows the oldest entries combinationally; pop_req asks
// for up to POP_MAX of them and pop_cnt = min(pop_req, avail) are removed at
// the same edge. A pushed instruction can be popped one cycle after its push.
//
// The published scheme only says that the prefetch unit collects the data and
// sends it to the processor on demand; depth, pointers and fetch_en are this
// design's own choices.
module xt_prefetch_buffer #(
  parameter int unsigned W        = xt_pkg::DEF_INSTR_W,
  parameter int unsigned DEPTH    = 32,
  parameter int unsigned PUSH_MAX = 4,
  parameter int unsigned POP_MAX  = 4,
  parameter int unsigned HEADROOM = 16,
  localparam int unsigned PTR_W   = $clog2(DEPTH),
  localparam int unsigned CNT_W   = $clog2(DEPTH + 1),
  localparam int unsigned PU_W    = $clog2(PUSH_MAX + 1),
  localparam int unsigned PO_W    = $clog2(POP_MAX + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [PU_W-1:0]               push_cnt,
  input  logic [PUSH_MAX-1:0][W-1:0]    push_data,
  input  logic [PO_W-1:0]               pop_req,
  output logic [PO_W-1:0]               pop_cnt,
  output logic [POP_MAX-1:0][W-1:0]     head_data,
  output logic [PO_W-1:0]               avail,
  output logic [CNT_W-1:0]              count,
  output logic                          fetch_en
);

  initial begin
    assert ((DEPTH & (DEPTH - 1)) == 0 && HEADROOM <= DEPTH)
      else $error("xt_prefetch_buffer: DEPTH must be a power of two and at least HEADROOM");
  end

  logic [W-1:0]     mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;

  always_comb begin
    avail   = (count >= CNT_W'(POP_MAX)) ? PO_W'(POP_MAX) : PO_W'(count);
    pop_cnt = (pop_req <= avail) ? pop_req : avail;
    for (int unsigned k = 0; k < POP_MAX; k++)
      head_data[k] = mem[rd_ptr + PTR_W'(k)];
    fetch_en = (CNT_W'(DEPTH) - count) >= CNT_W'(HEADROOM);
  end

  always_ff @(posedge clk) begin
    for (int unsigned k = 0; k < PUSH_MAX; k++)
      if (k < push_cnt) mem[wr_ptr + PTR_W'(k)] <= push_data[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      rd_ptr <= rd_ptr + PTR_W'(pop_cnt);
      wr_ptr <= wr_ptr + PTR_W'(push_cnt);
      count  <= count + CNT_W'(push_cnt) - CNT_W'(pop_cnt);
    end
  end

  // The memory side must never send more than the buffer can take.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(count) + int'(push_cnt) - int'(pop_cnt) <= int'(DEPTH))
    else $error("xt_prefetch_buffer: overflow (count %0d, push %0d, pop %0d)",
                count, push_cnt, pop_cnt);

endmodule
