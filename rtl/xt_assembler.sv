// xt_assembler: receiving end of the crosstalk-free bus (prefetch side).
//
// Each cycle the assembler takes the N channel segments and the N distinction
// wires off the bus. A segment whose distinction wire says "data" is kept, a
// NOP segment is dropped. The shift logic counts, for every channel, the NOP
// segments on the channels before it: that count is how many positions the
// segment moves left, which packs the data segments together in their original
// order. The packed segments are appended to the segments of an instruction
// left incomplete in the previous cycle (the buffer queue); every complete
// group of SPI = INSTR_W/CH_W segments is an instruction, the rest waits in the
// buffer queue for the next cycle. With 32-bit channels and 32-bit
// instructions each segment is a whole instruction and the queue stays empty.
//
// Interface and timing: bus_i is sampled at every rising edge; the
// instructions completed from it appear on out_instr[0..out_cnt-1] (first
// instruction in entry 0, first segment in the most significant bits) one
// cycle later, and out_cnt tells the prefetch unit how many were completed.
// There is no back-pressure: the bus has no stall wire, so the receiver must
// always accept (the prefetch unit keeps room for all data in flight).
// out_nops reports the NOP segments removed in that cycle.
//
// From the published scheme: NOP removal by distinction wires, per-segment
// left-shift amounts, packing, buffer queue for incomplete instructions and the
// completed-instruction count. This design's own: registered outputs, the
// one-cycle latency and the MSB-first segment order inside an instruction.
module xt_assembler
  import xt_pkg::*;
#(
  parameter int unsigned BUS_W    = DEF_BUS_W,
  parameter int unsigned CH_W     = DEF_CH_W,
  parameter int unsigned INSTR_W  = DEF_INSTR_W,
  parameter bit          NOP_ONES = 1'b0,
  localparam int unsigned N       = BUS_W / CH_W,
  localparam int unsigned WIRES   = BUS_W + 2 * N - 1,
  localparam int unsigned SPI     = INSTR_W / CH_W,          // segments per instruction
  localparam int unsigned MAXI    = N / SPI,                 // instructions per cycle, max
  localparam int unsigned PART    = (SPI > 1) ? SPI - 1 : 1, // buffer queue entries
  localparam int unsigned CNT_W   = $clog2(N + 1),
  localparam int unsigned OCNT_W  = $clog2(MAXI + 1),
  localparam int unsigned PCNT_W  = $clog2(PART + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [WIRES-1:0]               bus_i,
  output logic [OCNT_W-1:0]              out_cnt,
  output logic [MAXI-1:0][INSTR_W-1:0]   out_instr,
  output logic [CNT_W-1:0]               out_nops
);

  initial begin
    assert (BUS_W % CH_W == 0 && INSTR_W % CH_W == 0 && N % SPI == 0)
      else $error("xt_assembler: channel width must divide the instruction and bus widths");
  end

  typedef logic [CH_W-1:0] seg_t;

  seg_t              seg    [N];
  logic [N-1:0]      is_data;
  logic [CNT_W-1:0]  shamt  [N];     // left shift of each segment
  seg_t              packed_seg [N];
  logic [CNT_W-1:0]  nseg;

  seg_t              part   [PART];  // buffer queue for an incomplete instruction
  logic [PCNT_W-1:0] p_cnt;

  seg_t              comb_seg [PART + N];
  seg_t              part_nxt [PART];
  logic [PCNT_W-1:0] p_cnt_nxt;
  logic [OCNT_W-1:0] ninstr;
  logic [MAXI-1:0][INSTR_W-1:0] instr_nxt;

  // Take segments and distinction wires off the bus; work out the shifts.
  always_comb begin
    logic [CNT_W-1:0] nops;
    nops = '0;
    for (int unsigned c = 0; c < N; c++) begin
      seg[c]     = bus_i[ch_msb(BUS_W, CH_W, c) -: CH_W];
      is_data[c] = bus_i[wd_pos(BUS_W, CH_W, c)] ^ NOP_ONES;
      shamt[c]   = nops;
      if (!is_data[c]) nops = nops + CNT_W'(1);
    end
    nseg = CNT_W'(N) - nops;
  end

  // Remove NOP segments: segment c moves to position c - shamt[c].
  always_comb begin
    for (int unsigned k = 0; k < N; k++) packed_seg[k] = '0;
    for (int unsigned c = 0; c < N; c++)
      if (is_data[c]) packed_seg[c - int'(shamt[c])] = seg[c];
  end

  // Append to the buffer queue and cut complete instructions.
  always_comb begin
    int unsigned total, ni, pc, ns;
    pc = int'(p_cnt);
    ns = int'(nseg);
    for (int unsigned k = 0; k < PART + N; k++) begin
      if (k < pc)           comb_seg[k] = part[k];
      else if (k < pc + N)  comb_seg[k] = packed_seg[k - pc];
      else                  comb_seg[k] = '0;
    end
    total     = pc + ns;
    ni        = total / SPI;
    ninstr    = OCNT_W'(ni);
    p_cnt_nxt = PCNT_W'(total % SPI);
    for (int unsigned k = 0; k < PART; k++)
      part_nxt[k] = (ni * SPI + k < PART + N) ? comb_seg[ni * SPI + k] : '0;
    for (int unsigned m = 0; m < MAXI; m++)
      for (int unsigned s = 0; s < SPI; s++)
        instr_nxt[m][INSTR_W-1-s*CH_W -: CH_W] = comb_seg[m * SPI + s];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_cnt     <= '0;
      out_cnt   <= '0;
      out_nops  <= '0;
      out_instr <= '0;
      for (int unsigned k = 0; k < PART; k++) part[k] <= '0;
    end else begin
      p_cnt     <= p_cnt_nxt;
      out_cnt   <= ninstr;
      out_nops  <= CNT_W'(N) - nseg;
      out_instr <= instr_nxt;
      for (int unsigned k = 0; k < PART; k++) part[k] <= part_nxt[k];
    end
  end

endmodule
