// spc_exchange_top: digital core of a four-line stored-program-control
// telephone exchange.
//
// All switching is time-division: the four users' PCM codecs share one
// serial bus towards the exchange (DX) and one back (DR), each using its own
// 8-bit time slot of a 32-slot, 125 us frame. The core
//   - derives the 2.048 MHz bit clock and the slot pulses TP1..TP32 from the
//     4.096 MHz crystal (timeslot_gen);
//   - plays an 18-sample 450 Hz sine and gates it into dial, ring-back and
//     busy tone, and makes the 25 Hz ringing wave (tone_gen, sine_table);
//   - optionally replaces the ring-back tone with stored music (poly_ring,
//     enabled by poly_en);
//   - drives the tone bytes onto DX in slots TP9, TP10 and TP11
//     (dx_tone_driver), so tones are switched exactly like voice;
//   - takes the dialled digits from the four DTMF receivers (dtmf_capture);
//   - runs the call state machine of every user (call_ctrl), which decides
//     who hears what;
//   - copies, every frame, the chosen DX slots into the DR slots
//     (tsi_switch), one frame late.
//
// Board interface: clk is the 4.096 MHz oscillator; t2048 and tp go to the
// codecs (TP1..TP4 to the users' codecs, TP5..TP8 to the codecs feeding the
// DTMF receivers); dx_i is the DX bus as read, dx_o/dx_oe drive it during the
// tone slots; dr is the DR bus. hook_off and ring connect to the line
// interface chips, dtmf_q/dtmf_le_n to the DTMF receivers. user_number holds
// the four directory numbers (four DTMF codes each), set by the host;
// user_state, dialled and the call-record strobe go to the display/record
// processor. mus_we/mus_addr/mus_data load the music store.
module spc_exchange_top
  import spc_pkg::*;
#(
  parameter int RB_ON      = 8000,
  parameter int RB_OFF     = 32000,
  parameter int BUSY_ON    = 2000,
  parameter int BUSY_OFF   = 2000,
  parameter int RING_HALF  = 160,
  parameter int NO_DIAL    = 160000,
  parameter int NO_ANSWER  = 480000,
  parameter int MUS_DEPTH  = 80000,
  localparam int MAW       = $clog2(MUS_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // codec buses
  output logic               t2048,
  output logic [N_SLOTS-1:0] tp,
  input  logic               dx_i,
  output logic               dx_o,
  output logic               dx_oe,
  output logic               dr,
  // line interface and DTMF receivers
  input  logic [N_USERS-1:0] hook_off,
  output logic [N_USERS-1:0] ring,
  input  logic [3:0]         dtmf_q      [N_USERS],
  input  logic [N_USERS-1:0] dtmf_le_n,
  // host / display side
  input  logic [15:0]        user_number [N_USERS],
  output user_state_t        user_state  [N_USERS],
  output logic [15:0]        dialled     [N_USERS],
  output logic               rec_valid,
  output call_record_t       rec,
  input  logic               poly_en,
  input  logic               mus_we,
  input  logic [MAW-1:0]     mus_addr,
  input  logic [7:0]         mus_data
);

  logic              frame_tick, bit_sample;
  logic [SLOT_W-1:0] dslot;
  logic [2:0]        dbit;
  logic [7:0]        dial_code, rb_code, busy_code, mus_code, rb_slot_code;
  logic              ring_wave;
  logic [N_USERS-1:0] digit_valid, ringing;
  logic [3:0]        digit [N_USERS];
  route_t            route [N_SLOTS];
  logic              dx_bus;
  logic              ringback_heard;

  timeslot_gen u_ts (
    .clk, .rst_n, .t2048, .tp, .frame_tick, .dslot, .dbit, .bit_start(), .bit_sample
  );

  tone_gen #(
    .RB_ON(RB_ON), .RB_OFF(RB_OFF), .BUSY_ON(BUSY_ON), .BUSY_OFF(BUSY_OFF),
    .RING_HALF(RING_HALF)
  ) u_tone (
    .clk, .rst_n, .frame_tick, .dial_code, .rb_code, .busy_code,
    .rb_on(), .busy_on(), .ring_wave
  );

  always_comb begin
    ringback_heard = 1'b0;
    for (int u = 0; u < N_USERS; u++)
      if (user_state[u] == ST_H) ringback_heard = 1'b1;
  end

  poly_ring #(.DEPTH(MUS_DEPTH)) u_music (
    .clk, .rst_n, .frame_tick, .play(poly_en && ringback_heard),
    .we(mus_we), .waddr(mus_addr), .wdata(mus_data), .code(mus_code)
  );

  assign rb_slot_code = poly_en ? mus_code : rb_code;

  dx_tone_driver u_dxdrv (
    .clk, .rst_n, .dslot, .dbit, .bit_sample,
    .dial_code, .rb_code(rb_slot_code), .busy_code, .dx_o, .dx_oe
  );

  for (genvar u = 0; u < N_USERS; u++) begin : g_dtmf
    dtmf_capture u_cap (
      .clk, .rst_n, .q(dtmf_q[u]), .le_n(dtmf_le_n[u]),
      .digit_valid(digit_valid[u]), .digit(digit[u])
    );
  end

  call_ctrl #(.NO_DIAL(NO_DIAL), .NO_ANSWER(NO_ANSWER)) u_ctrl (
    .clk, .rst_n, .frame_tick, .hook_off, .digit_valid, .digit, .user_number,
    .state(user_state), .dialled, .ringing, .route, .rec_valid, .rec
  );

  assign ring = ringing & {N_USERS{ring_wave}};

  // The switch hears the DX bus as it is, including the core's own tones.
  assign dx_bus = dx_oe ? dx_o : dx_i;

  tsi_switch u_tsi (
    .clk, .rst_n, .dslot, .dbit, .bit_sample, .dx(dx_bus), .route, .dr
  );

endmodule
