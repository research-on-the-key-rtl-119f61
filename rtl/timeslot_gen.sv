// timeslot_gen: frame and time slot timing of the exchange.
//
// A 9-bit counter runs on the 4.096 MHz clock and wraps every 512 clocks, which
// is one 125 us frame. Its low bit halves the clock into the 2.048 MHz bit
// clock T2048 (high in the first clock of each bit period), and its upper
// eight bits count the 256 bit periods of the frame. TP1..TP32 are sync pulses
// one bit period wide; TP(k+1) is TP(k) delayed by eight bit clocks, as the
// document describes. The data of a slot occupies the eight bit periods that
// follow its sync pulse, most significant bit first, the short-frame-sync
// convention of the TP3067 codec; this placement is this design's reading.
//
// Outputs for the rest of the core: frame_tick (one clock at the start of a
// data frame, i.e. the first bit of slot 0), dslot/dbit (the slot and bit now
// on DX/DR), bit_start (first clock of a bit: T2048 high, where DR changes) and
// bit_sample (second clock: T2048 low, where DX is sampled). All outputs are
// decoded from the counter register; there is no further latency.
module timeslot_gen
  import spc_pkg::*;
(
  input  logic               clk,        // 4.096 MHz
  input  logic               rst_n,
  output logic               t2048,
  output logic [N_SLOTS-1:0] tp,         // tp[k] is TP(k+1)
  output logic               frame_tick,
  output logic [SLOT_W-1:0]  dslot,
  output logic [2:0]         dbit,       // 0 = MSB
  output logic               bit_start,
  output logic               bit_sample
);

  localparam int CNT_W = $clog2(N_SLOTS * SLOT_BITS * 2);

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-2:0] bitpos;   // bit period within the frame, 0..255
  logic [CNT_W-2:0] datapos;  // bit period counted from the first data bit

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;

  assign bitpos     = cnt[CNT_W-1:1];
  assign datapos    = bitpos - 1'b1;
  assign t2048      = ~cnt[0];
  assign bit_start  = ~cnt[0];
  assign bit_sample =  cnt[0];
  assign dslot      = datapos[CNT_W-2:3];
  assign dbit       = datapos[2:0];
  assign frame_tick = (datapos == '0) && !cnt[0];

  always_comb
    for (int k = 0; k < N_SLOTS; k++)
      tp[k] = (bitpos == (CNT_W-1)'(k * SLOT_BITS));

  // At most one slot pulse at a time, and TP1 marks the frame start.
  a_tp_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(tp));
  a_tp1_frame: assert property (@(posedge clk) disable iff (!rst_n)
                                frame_tick |-> $past(tp[0], 2));

endmodule
