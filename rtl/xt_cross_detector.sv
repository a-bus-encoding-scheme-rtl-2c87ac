// xt_cross_detector: undesirable-pattern detector for one channel.
//
// An undesirable pattern is a pair of adjacent wires of which one rises while
// the other falls. Comparing the segment already on a channel (prev_seg, the
// channel's data register) with a candidate segment (cur_seg), the detector
// forms a rise and a fall vector per wire and flags any adjacent pair with a
// rise next to a fall. All 4C and 3C couplings and the opposite-switching 2C
// cases are caught this way; same-direction and one-wire-static cases pass.
//
// Purely combinational, no clock. One instance exists per (channel, candidate)
// pair in the deassembler, so all checks of a cycle run in parallel, as the
// scheme requires. The rise/fall formulation is this design's own.
module xt_cross_detector #(
  parameter int unsigned CH_W = xt_pkg::DEF_CH_W
) (
  input  logic [CH_W-1:0] prev_seg,   // segment sent on this channel last cycle
  input  logic [CH_W-1:0] cur_seg,    // candidate segment for this cycle
  output logic            crosstalk   // 1: sending cur_seg would be an invalid transition
);

  logic [CH_W-1:0] rise, fall;

  always_comb begin
    rise      = ~prev_seg & cur_seg;
    fall      = prev_seg & ~cur_seg;
    crosstalk = |((rise[CH_W-1:1] & fall[CH_W-2:0]) |
                  (fall[CH_W-1:1] & rise[CH_W-2:0]));
  end

endmodule
