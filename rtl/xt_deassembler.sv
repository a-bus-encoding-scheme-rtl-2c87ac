// xt_deassembler: sending end of the crosstalk-free bus (memory side).
//
// Words of BUS_W bits arrive on a valid/ready handshake and are cut into
// N = BUS_W/CH_W segments (channel 1 = most significant segment), which enter
// a segment queue of 2N entries. Each cycle the first N queued segments form
// the window data_{t,1..N}. For every channel i there is a data register
// (data_reg_i, the segment now on channel i) and one cross detector per
// candidate j <= i, all evaluated in parallel. The per-channel select logic
// then places the window segments in order: a segment that would make an
// undesirable pattern against a channel's data register is moved to the next
// channel and that channel carries a NOP segment; segments that do not fit on
// the last channel stay in the queue for the next cycle. A NOP segment never
// conflicts with what follows it, so a segment waits at most one cycle, and the
// worst case is one all-NOP cycle per data cycle.
//
// The data registers drive the bus directly: the bus value changes only at
// the clock edge, one cycle after the window was formed. Each channel is
// followed by its distinction wire and, except the last, a separation wire
// held at the NOP level (wire order in xt_pkg).
//
// Interface and timing:
//   in_valid/in_ready/in_data  word input; in_ready is high while the queue
//                              holds at most N segments, so with no conflicts
//                              one word per cycle flows through and a word
//                              accepted at edge k is on the bus after edge k+1.
//   bus_o                      BUS_W + 2N - 1 physical wires.
//   sent_cnt                   data segments put on the bus at the next edge.
//   nop_cnt                    NOP segments inserted in front of or between
//                              pending data segments at the next edge.
//   deferred_cnt               window segments left for a later cycle.
// Reset puts NOP segments on every channel and empties the queue.
//
// From the published scheme: channel split, data registers, parallel cross
// detectors, in-order shifting with NOP insertion, deferral to the next cycle,
// separation and distinction wires. This design's own choices: the 2N-entry
// segment queue and its handshake, registered bus outputs, NOP on channels
// left without a segment.
module xt_deassembler
  import xt_pkg::*;
#(
  parameter int unsigned BUS_W    = DEF_BUS_W,
  parameter int unsigned CH_W     = DEF_CH_W,
  parameter bit          NOP_ONES = 1'b0,
  localparam int unsigned N       = BUS_W / CH_W,
  localparam int unsigned WIRES   = BUS_W + 2 * N - 1,
  localparam int unsigned CNT_W   = $clog2(N + 1),
  localparam int unsigned QCNT_W  = $clog2(2 * N + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [BUS_W-1:0]  in_data,
  output logic [WIRES-1:0]  bus_o,
  output logic [CNT_W-1:0]  sent_cnt,
  output logic [CNT_W-1:0]  nop_cnt,
  output logic [CNT_W-1:0]  deferred_cnt
);

  initial begin
    assert (BUS_W % CH_W == 0 && N >= 2 && CH_W >= 2)
      else $error("xt_deassembler: BUS_W must be a multiple of CH_W with at least two channels");
  end

  typedef logic [CH_W-1:0] seg_t;

  // Segment queue: q[0] is the oldest segment.
  seg_t              q      [2*N];
  logic [QCNT_W-1:0] q_cnt;

  // data_reg_i and the distinction wire value of each channel.
  seg_t              data_reg [N];
  logic [N-1:0]      wd_reg;

  // Window of candidates for this cycle.
  seg_t              win      [N];
  logic [CNT_W-1:0]  win_cnt;

  // Cross detector outputs: xt[i][j] for candidate j against data_reg_i, j <= i.
  logic [N-1:0]      xt       [N];

  // Select-logic chain.
  logic [CNT_W-1:0]  placed   [N+1];
  seg_t              ch_seg   [N];
  logic [N-1:0]      ch_wd;
  logic [N-1:0]      ch_data;

  logic              push;
  seg_t              in_seg   [N];

  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      win[k]    = q[k];
      in_seg[k] = in_data[BUS_W-1-k*CH_W -: CH_W];
    end
    win_cnt = (q_cnt >= QCNT_W'(N)) ? CNT_W'(N) : CNT_W'(q_cnt);
  end

  assign placed[0] = '0;

  for (genvar i = 0; i < N; i++) begin : g_ch
    logic [i:0][CH_W-1:0] cand;
    for (genvar j = 0; j <= i; j++) begin : g_det
      assign cand[j] = win[j];
      xt_cross_detector #(.CH_W(CH_W)) u_det (
        .prev_seg  (data_reg[i]),
        .cur_seg   (win[j]),
        .crosstalk (xt[i][j])
      );
    end
    if (i < N - 1) begin : g_unused
      assign xt[i][N-1:i+1] = '0;
    end

    xt_sel_logic #(.N(N), .CH_W(CH_W), .CH(i), .NOP_ONES(NOP_ONES)) u_sel (
      .placed_in  (placed[i]),
      .win_cnt    (win_cnt),
      .cand_seg   (cand),
      .xt         (xt[i][i:0]),
      .seg_out    (ch_seg[i]),
      .wd_out     (ch_wd[i]),
      .is_data    (ch_data[i]),
      .placed_out (placed[i+1])
    );
  end

  // Handshake and queue update.
  assign in_ready = (q_cnt <= QCNT_W'(N));
  assign push     = in_valid && in_ready;

  always_comb begin
    sent_cnt     = placed[N];
    deferred_cnt = win_cnt - placed[N];
    // NOPs that delayed a pending segment: channels without data before the
    // last pending segment was placed or while segments are still deferred.
    nop_cnt = '0;
    for (int unsigned i = 0; i < N; i++)
      if (!ch_data[i] && (placed[i] < win_cnt))
        nop_cnt = nop_cnt + CNT_W'(1);
  end

  // Next queue contents: drop the placed segments, append the new word.
  seg_t              q_nxt [2*N];
  logic [QCNT_W-1:0] q_cnt_nxt;

  always_comb begin
    int unsigned np, rest;
    np   = int'(placed[N]);
    rest = int'(q_cnt) - np;
    for (int unsigned k = 0; k < 2 * N; k++) begin
      if (k < rest)
        q_nxt[k] = q[k + np];
      else if (push && k < rest + N)
        q_nxt[k] = in_seg[k - rest];
      else
        q_nxt[k] = q[k];
    end
    q_cnt_nxt = QCNT_W'(rest + (push ? N : 0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cnt  <= '0;
      wd_reg <= {N{NOP_ONES}};
      for (int unsigned i = 0; i < N; i++) data_reg[i] <= {CH_W{NOP_ONES}};
      for (int unsigned k = 0; k < 2 * N; k++) q[k] <= '0;
    end else begin
      for (int unsigned i = 0; i < N; i++) data_reg[i] <= ch_seg[i];
      wd_reg <= ch_wd;
      for (int unsigned k = 0; k < 2 * N; k++) q[k] <= q_nxt[k];
      q_cnt  <= q_cnt_nxt;
    end
  end

  // Physical wire order: channel, distinction wire, separation wire.
  always_comb begin
    bus_o = {WIRES{NOP_ONES}};
    for (int unsigned c = 0; c < N; c++) begin
      bus_o[ch_msb(BUS_W, CH_W, c) -: CH_W] = data_reg[c];
      bus_o[wd_pos(BUS_W, CH_W, c)]         = wd_reg[c];
    end
  end

endmodule
