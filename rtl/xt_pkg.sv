// xt_pkg: constants and wire-layout helpers shared by the crosstalk-free bus.
//
// The b-bit word is cut into N = BUS_W/CH_W channels. Channel 1 carries the
// most significant CH_W bits of the word (bits 127..96 for a 128-bit word with
// 32-bit channels), channel 2 the next CH_W bits, and so on. On the physical
// bus each channel is followed by its distinction wire (Wd), and every channel
// except the last is then followed by a separation (shield) wire (Ws):
//
//   MSB  ch1[CH_W-1:0] Wd1 Ws1 ch2[...] Wd2 Ws2 ... chN[...] WdN  LSB
//
// so the bus has BUS_W + N + (N-1) wires: 135 for 128-bit / 32-bit channels,
// i.e. 7 extra wires, 15 extra for 16-bit channels. The wire order and the
// count of extra wires follow the published scheme; the numbering from the MSB
// is this design's choice.
package xt_pkg;

  // Default sizes of the main configuration: 128-bit instruction bus, 32-bit
  // channels, 32-bit instructions, four instructions fetched per word.
  localparam int unsigned DEF_BUS_W   = 128;
  localparam int unsigned DEF_CH_W    = 32;
  localparam int unsigned DEF_INSTR_W = 32;

  // Number of physical wires for a bus of bus_w data bits and ch_w-bit channels.
  function automatic int unsigned n_bus_wires(int unsigned bus_w, int unsigned ch_w);
    return bus_w + 2 * (bus_w / ch_w) - 1;
  endfunction

  // Index of the most significant wire of channel c (0-based: c = 0 is channel 1).
  function automatic int unsigned ch_msb(int unsigned bus_w, int unsigned ch_w,
                                         int unsigned c);
    return n_bus_wires(bus_w, ch_w) - 1 - c * (ch_w + 2);
  endfunction

  // Index of the distinction wire of channel c: right below its last data wire.
  function automatic int unsigned wd_pos(int unsigned bus_w, int unsigned ch_w,
                                         int unsigned c);
    return ch_msb(bus_w, ch_w, c) - ch_w;
  endfunction

  // Index of the separation wire that follows channel c (c < N-1 only).
  function automatic int unsigned ws_pos(int unsigned bus_w, int unsigned ch_w,
                                         int unsigned c);
    return ch_msb(bus_w, ch_w, c) - ch_w - 1;
  endfunction

endpackage
