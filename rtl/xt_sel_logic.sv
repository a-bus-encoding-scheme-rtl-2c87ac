// xt_sel_logic: channel selection logic with its two multiplexers for one
// channel of the deassembler (Sel_logic_i, MUX1_i and MUX2_i of the scheme).
//
// Segments keep their order and may only move to a later channel or to the
// next cycle. Channel i (0-based index CH) can therefore carry only candidate
// segments 0..CH of the current window. The channels form a chain: placed_in
// is the number of window segments already put on channels 0..CH-1, so the
// next segment in line is number placed_in. If that segment exists and its
// cross detector against this channel's data register is clear, it is sent
// here (MUX1 picks it, MUX2 drives the distinction wire to "data");
// otherwise this channel carries a NOP segment and the same segment is offered
// to the next channel. placed_out feeds the next channel's Sel_logic.
//
// The published scheme gives the inputs and outputs of these elements but not
// their insides; the in-order chain is the simplest logic with the described
// behaviour. NOP is all-0 with Wd = 0 (NOP_ONES = 0, the main encoding) or
// all-1 with Wd = 1 (NOP_ONES = 1, the alternative encoding).
//
// Purely combinational.
module xt_sel_logic #(
  parameter int unsigned N        = xt_pkg::DEF_BUS_W / xt_pkg::DEF_CH_W, // channels
  parameter int unsigned CH_W     = xt_pkg::DEF_CH_W,                     // channel width
  parameter int unsigned CH       = 0,                                    // this channel, 0-based
  parameter bit          NOP_ONES = 1'b0,
  localparam int unsigned CNT_W   = $clog2(N + 1)
) (
  input  logic [CNT_W-1:0]        placed_in,  // window segments placed on earlier channels
  input  logic [CNT_W-1:0]        win_cnt,    // valid segments in the window
  input  logic [CH:0][CH_W-1:0]   cand_seg,   // data_{t,j}, j = 0..CH
  input  logic [CH:0]             xt,         // cross_detector_{CH,j} outputs
  output logic [CH_W-1:0]         seg_out,    // segment driven on this channel
  output logic                    wd_out,     // distinction wire value
  output logic                    is_data,    // 1: a data segment, 0: a NOP segment
  output logic [CNT_W-1:0]        placed_out  // placed_in plus one if a segment went here
);

  always_comb begin
    is_data = 1'b0;
    seg_out = {CH_W{NOP_ONES}};
    for (int unsigned j = 0; j <= CH; j++) begin
      if (placed_in == CNT_W'(j) && CNT_W'(j) < win_cnt && !xt[j]) begin
        is_data = 1'b1;
        seg_out = cand_seg[j];
      end
    end
    wd_out     = is_data ^ NOP_ONES;
    placed_out = placed_in + CNT_W'(is_data);
  end

endmodule
