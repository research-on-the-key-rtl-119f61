// spc_pkg: types and constants shared by the exchange core.
//
// The frame is 125 us long and holds 32 time slots of 8 bits at 2.048 Mbit/s,
// all derived from one 4.096 MHz clock. Slots are numbered from 0 here; slot k
// is the one whose sync pulse is TP(k+1). The slot plan follows the document:
// TP1..TP4 carry the four users, TP5..TP8 feed each user's DTMF receiver,
// TP9 carries dial tone, TP10 ring-back tone and TP11 busy tone. The per-user
// call states are the eight of the front-panel display, in its order.
package spc_pkg;

  localparam int N_SLOTS   = 32;
  localparam int SLOT_BITS = 8;
  localparam int N_USERS   = 4;
  localparam int SLOT_W    = $clog2(N_SLOTS);
  localparam int USER_W    = $clog2(N_USERS);

  // Slot plan (0-based slot numbers).
  localparam logic [SLOT_W-1:0] USER_SLOT0 = 5'd0;   // TP1..TP4
  localparam logic [SLOT_W-1:0] DTMF_SLOT0 = 5'd4;   // TP5..TP8
  localparam logic [SLOT_W-1:0] DIAL_SLOT  = 5'd8;   // TP9
  localparam logic [SLOT_W-1:0] RB_SLOT    = 5'd9;   // TP10
  localparam logic [SLOT_W-1:0] BUSY_SLOT  = 5'd10;  // TP11

  // A-law code of the zero level as the codec uses it (even bits inverted):
  // sent in any DR slot that has no source and in the off part of a cadence.
  localparam logic [7:0] IDLE_CODE = 8'hD5;

  // Operating state of one user, in the order of the display columns.
  typedef enum logic [2:0] {
    ST_G  = 3'd0,  // on-hook
    ST_Z1 = 3'd1,  // off-hook, hearing dial tone
    ST_D  = 3'd2,  // wait: number complete, being analysed
    ST_H  = 3'd3,  // hearing ring-back tone
    ST_B  = 3'd4,  // dialling
    ST_Z2 = 3'd5,  // being rung
    ST_T  = 3'd6,  // in a call
    ST_M  = 3'd7   // hearing busy tone
  } user_state_t;

  // One entry of the switch's connection table: which DX slot of the previous
  // frame is sent in a given DR slot.
  typedef struct packed {
    logic              en;
    logic [SLOT_W-1:0] src;
  } route_t;

  // A finished call, for the record store.
  typedef struct packed {
    logic [USER_W-1:0] caller;
    logic [USER_W-1:0] callee;
    logic [15:0]       seconds;
  } call_record_t;

endpackage
