// call_ctrl: call processing for the four users.
//
// Each user has a state machine over the eight display states:
//   G  on-hook      -> Z1 when the hook comes off
//   Z1 dial tone    -> B on the first digit; M after NO_DIAL frames with none
//   B  dialling     -> D after the DIGITS-th digit; M after NO_DIAL frames
//                      without a further digit
//   D  wait         -> at the next frame tick the number is compared with the
//                      users' numbers: H (and the called user Z2) if it names
//                      another user who is on-hook, M otherwise
//   H  ring-back    -> T when the called user answers; M after NO_ANSWER
//                      frames (the called user then returns to G)
//   Z2 being rung   -> T when the hook comes off
//   T  in a call    -> the other party goes to M when one side hangs up
//   M  busy tone    -> G when the hook goes on
// Putting the hook on returns a user to G from any state; a caller who hangs
// up while ringing frees the called user. The users are evaluated in index
// order within one clock, each seeing the updates of those before it, so two
// users acting on a third at once are resolved by index.
//
// From the states it builds the switch's connection table (route): a user in
// Z1 hears TP9, in H TP10, in M TP11 and in T the other party's slot; in Z1
// and B the user's own DX slot is also copied to its DTMF slot (TP5..TP8),
// whose codec feeds the DTMF receiver. `ringing` marks users in Z2. When a
// call ends, a record (caller, callee, whole seconds of conversation) is
// queued per caller and presented on rec_valid/rec, one per clock, lowest
// caller first. Only the entries of TP1..TP8 are ever enabled; the other
// entries of the table are constant zero (disabled) and kept only so that the
// switch's table spans the whole frame.
//
// The sequence of the call, the 4-digit number, the 20 s no-dial limit and
// the tones each state hears follow the document. The meaning of D, the
// no-answer limit, busy tone for a wrong or busy number, and silence while
// dialling are this design's choices. Hook inputs pass a two-flop
// synchroniser (two clocks of latency); timers count frame ticks.
module call_ctrl
  import spc_pkg::*;
#(
  parameter int DIGITS         = 4,
  parameter int NO_DIAL        = 160000,  // frames, 20 s
  parameter int NO_ANSWER      = 480000,  // frames, 60 s
  parameter int FRAMES_PER_SEC = 8000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    frame_tick,
  input  logic [N_USERS-1:0]      hook_off,
  input  logic [N_USERS-1:0]      digit_valid,
  input  logic [3:0]              digit       [N_USERS],
  input  logic [4*DIGITS-1:0]     user_number [N_USERS],
  output user_state_t             state       [N_USERS],
  output logic [4*DIGITS-1:0]     dialled     [N_USERS],
  output logic [N_USERS-1:0]      ringing,
  output route_t                  route       [N_SLOTS],
  output logic                    rec_valid,
  output call_record_t            rec
);

  localparam int TMAX = (NO_DIAL > NO_ANSWER) ? NO_DIAL : NO_ANSWER;
  localparam int TW   = $clog2(TMAX + 1);
  localparam int SUBW = $clog2(FRAMES_PER_SEC);
  localparam int DCW  = $clog2(DIGITS + 1);

  logic [1:0]          hook_sync [N_USERS];
  logic [N_USERS-1:0]  hook;

  user_state_t         st    [N_USERS], n_st    [N_USERS];
  logic [USER_W-1:0]   peer  [N_USERS], n_peer  [N_USERS];
  logic [TW-1:0]       timer [N_USERS], n_timer [N_USERS];
  logic [DCW-1:0]      dcnt  [N_USERS], n_dcnt  [N_USERS];
  logic [4*DIGITS-1:0] num   [N_USERS], n_num   [N_USERS];
  logic [SUBW-1:0]     dsub  [N_USERS], n_dsub  [N_USERS];   // caller's call time
  logic [15:0]         dsec  [N_USERS], n_dsec  [N_USERS];
  logic [N_USERS-1:0]  caller, n_caller;
  logic [N_USERS-1:0]  pend,   n_pend;                      // record waiting
  logic [USER_W-1:0]   rcallee [N_USERS], n_rcallee [N_USERS];
  logic [15:0]         rsec    [N_USERS], n_rsec    [N_USERS];

  // Hook synchronisers.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) for (int u = 0; u < N_USERS; u++) hook_sync[u] <= '0;
    else        for (int u = 0; u < N_USERS; u++) hook_sync[u] <= {hook_sync[u][0], hook_off[u]};

  always_comb
    for (int u = 0; u < N_USERS; u++) hook[u] = hook_sync[u][1];

  // Next-state logic for all users, evaluated in index order.
  always_comb begin
    logic [N_USERS-1:0] restart;
    logic               found;
    logic [USER_W-1:0]  tgt;
    logic [USER_W-1:0]  p;

    n_st = st;  n_peer = peer;  n_dcnt = dcnt;  n_num = num;
    n_dsub = dsub;  n_dsec = dsec;  n_caller = caller;
    n_pend = pend;  n_rcallee = rcallee;  n_rsec = rsec;
    restart = '0;
    found = 1'b0;
    tgt = '0;

    for (int u = 0; u < N_USERS; u++) begin
      p = n_peer[u];
      unique case (n_st[u])
        ST_G:
          if (hook[u]) begin
            n_st[u]   = ST_Z1;
            n_dcnt[u] = '0;
          end
        ST_Z1, ST_B:
          if (!hook[u]) n_st[u] = ST_G;
          else if (digit_valid[u]) begin
            n_num[u]   = {n_num[u][4*DIGITS-5:0], digit[u]};
            n_dcnt[u]  = n_dcnt[u] + 1'b1;
            restart[u] = 1'b1;
            n_st[u]    = (n_dcnt[u] == DCW'(DIGITS)) ? ST_D : ST_B;
          end else if (frame_tick && timer[u] >= TW'(NO_DIAL))
            n_st[u] = ST_M;
        ST_D:
          if (!hook[u]) n_st[u] = ST_G;
          else if (frame_tick) begin
            found = 1'b0;
            tgt   = '0;
            for (int v = 0; v < N_USERS; v++)
              if (!found && user_number[v] == n_num[u]) begin
                found = 1'b1;
                tgt   = USER_W'(v);
              end
            if (found && tgt != USER_W'(u) && n_st[tgt] == ST_G) begin
              n_st[u]     = ST_H;
              n_peer[u]   = tgt;
              n_caller[u] = 1'b1;
              n_st[tgt]   = ST_Z2;
              n_peer[tgt] = USER_W'(u);
              n_caller[tgt] = 1'b0;
              restart[tgt]  = 1'b1;
            end else
              n_st[u] = ST_M;
          end
        ST_H:
          if (!hook[u]) begin
            n_st[u] = ST_G;
            if (n_st[p] == ST_Z2) n_st[p] = ST_G;
          end else if (frame_tick && timer[u] >= TW'(NO_ANSWER)) begin
            n_st[u] = ST_M;
            if (n_st[p] == ST_Z2) n_st[p] = ST_G;
          end
        ST_Z2:
          if (hook[u] && n_st[p] == ST_H) begin
            n_st[u] = ST_T;
            n_st[p] = ST_T;
            n_dsub[p] = '0;
            n_dsec[p] = '0;
          end
        ST_T:
          if (!hook[u]) begin
            n_st[u] = ST_G;
            if (n_st[p] == ST_T) n_st[p] = ST_M;
          end
        ST_M:
          if (!hook[u]) n_st[u] = ST_G;
        default: n_st[u] = ST_G;
      endcase
    end

    // Conversation time of each caller, and a record when its call ends.
    for (int u = 0; u < N_USERS; u++) begin
      if (caller[u] && st[u] == ST_T && frame_tick) begin
        if (dsub[u] == SUBW'(FRAMES_PER_SEC - 1)) begin
          n_dsub[u] = '0;
          n_dsec[u] = dsec[u] + 1'b1;
        end else
          n_dsub[u] = dsub[u] + 1'b1;
      end
      if (caller[u] && st[u] == ST_T && n_st[u] != ST_T) begin
        n_pend[u]    = 1'b1;
        n_rcallee[u] = peer[u];
        n_rsec[u]    = n_dsec[u];
      end
    end
    // One record leaves per clock, lowest caller first.
    for (int u = 0; u < N_USERS; u++)
      if (pend[u] && (pend & ((N_USERS)'(1) << u) - 1'b1) == '0) n_pend[u] = 1'b0;

    for (int u = 0; u < N_USERS; u++)
      if (n_st[u] != st[u] || restart[u]) n_timer[u] = '0;
      else if (frame_tick && timer[u] != TW'(TMAX)) n_timer[u] = timer[u] + 1'b1;
      else n_timer[u] = timer[u];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int u = 0; u < N_USERS; u++) begin
        st[u]      <= ST_G;
        peer[u]    <= '0;
        timer[u]   <= '0;
        dcnt[u]    <= '0;
        num[u]     <= '0;
        dsub[u]    <= '0;
        dsec[u]    <= '0;
        rcallee[u] <= '0;
        rsec[u]    <= '0;
      end
      caller <= '0;
      pend   <= '0;
    end else begin
      st <= n_st;  peer <= n_peer;  timer <= n_timer;  dcnt <= n_dcnt;
      num <= n_num;  dsub <= n_dsub;  dsec <= n_dsec;  caller <= n_caller;
      pend <= n_pend;  rcallee <= n_rcallee;  rsec <= n_rsec;
    end

  // Record output: the lowest pending caller.
  always_comb begin
    rec_valid = 1'b0;
    rec       = '0;
    for (int u = N_USERS - 1; u >= 0; u--)
      if (pend[u]) begin
        rec_valid  = 1'b1;
        rec.caller = USER_W'(u);
        rec.callee = rcallee[u];
        rec.seconds = rsec[u];
      end
  end

  // Connection table for the switch, decoded from the states.
  always_comb begin
    for (int s = 0; s < N_SLOTS; s++) route[s] = '0;
    for (int u = 0; u < N_USERS; u++) begin
      unique case (st[u])
        ST_Z1: begin
          route[int'(USER_SLOT0) + u] = '{en: 1'b1, src: DIAL_SLOT};
          route[int'(DTMF_SLOT0) + u] = '{en: 1'b1, src: USER_SLOT0 + SLOT_W'(u)};
        end
        ST_B:  route[int'(DTMF_SLOT0) + u] = '{en: 1'b1, src: USER_SLOT0 + SLOT_W'(u)};
        ST_H:  route[int'(USER_SLOT0) + u] = '{en: 1'b1, src: RB_SLOT};
        ST_T:  route[int'(USER_SLOT0) + u] = '{en: 1'b1, src: USER_SLOT0 + SLOT_W'(peer[u])};
        ST_M:  route[int'(USER_SLOT0) + u] = '{en: 1'b1, src: BUSY_SLOT};
        default: ;
      endcase
    end
  end

  // Two users in a call, or ringing/being rung, always point at each other.
  for (genvar u = 0; u < N_USERS; u++) begin : g_pair_chk
    a_call_pair: assert property (@(posedge clk) disable iff (!rst_n)
      st[u] == ST_T |-> st[peer[u]] == ST_T && peer[peer[u]] == USER_W'(u));
    a_ring_pair: assert property (@(posedge clk) disable iff (!rst_n)
      st[u] == ST_Z2 |-> st[peer[u]] == ST_H && peer[peer[u]] == USER_W'(u));
  end

  always_comb
    for (int u = 0; u < N_USERS; u++) begin
      state[u]   = st[u];
      dialled[u] = num[u];
      ringing[u] = (st[u] == ST_Z2);
    end

endmodule
