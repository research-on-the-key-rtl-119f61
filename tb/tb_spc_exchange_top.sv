// tb_spc_exchange_top: end-to-end test of the exchange core with short
// cadences and timers.
//
// The testbench plays the board around the core: four user codecs that talk
// on DX in slots TP1..TP4 (a byte per frame that encodes user and frame),
// four DTMF receivers that present key codes, the hook switches, and the
// host that sets the directory numbers and loads the music store. It reads
// back every DX and DR byte of every frame from its own count of the bus
// timing and, for each frame in which no user changed state, checks every
// user slot and DTMF slot of DR against the DX slot the document's call
// sequence says it must copy from the previous frame (dial tone TP9,
// ring-back TP10, busy TP11, the other party's slot, or idle).
//
// Scenario: user 1 calls user 2 (dial tone, four digits, ring-back through
// on and off periods while user 2 rings at 25 Hz, conversation, user 2 hangs
// up and user 1 hears busy tone through on and off periods); user 3 calls
// user 4 with the polyphonic ring-back enabled; user 2 lifts the handset and
// never dials until the no-dial timer gives busy tone. Each mechanism is
// counted and one that never happened counts as a failure.
module tb_spc_exchange_top;
  import spc_pkg::*;

  localparam int RB_ON = 40, RB_OFF = 60, BUSY_ON = 10, BUSY_OFF = 10, RING_HALF = 4;
  localparam int NO_DIAL = 300, NO_ANSWER = 2000, MUS_DEPTH = 64;
  localparam int MAXF = 1400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic t2048, dx_i, dx_o, dx_oe, dr, rec_valid, poly_en = 1'b0, mus_we = 1'b0;
  logic [N_SLOTS-1:0] tp;
  logic [N_USERS-1:0] hook_off = '0, ring, dtmf_le_n = '1;
  logic [3:0] dtmf_q [N_USERS];
  logic [15:0] user_number [N_USERS];
  user_state_t user_state [N_USERS];
  logic [15:0] dialled [N_USERS];
  call_record_t rec;
  logic [$clog2(MUS_DEPTH)-1:0] mus_addr = '0;
  logic [7:0] mus_data = '0;

  spc_exchange_top #(
    .RB_ON(RB_ON), .RB_OFF(RB_OFF), .BUSY_ON(BUSY_ON), .BUSY_OFF(BUSY_OFF),
    .RING_HALF(RING_HALF), .NO_DIAL(NO_DIAL), .NO_ANSWER(NO_ANSWER), .MUS_DEPTH(MUS_DEPTH)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c = 0;                      // clocks since reset release
  int frame, pos;                 // data frame and bit position (from c)
  logic [7:0] dxb [MAXF][N_SLOTS];
  logic [7:0] drb [MAXF][N_SLOTS];
  user_state_t st_at [MAXF][N_USERS];
  int peer [N_USERS];
  logic [7:0] dxsh, drsh;
  logic [7:0] sine [18] = '{8'hA1, 8'hC7, 8'hC6, 8'hA0, 8'hB0, 8'hD0, 8'hAC, 8'hD0, 8'hB0,
                            8'hA0, 8'hC6, 8'hC7, 8'hA1, 8'hB1, 8'hD1, 8'hAD, 8'hD1, 8'hB1};
  // mechanism counters
  int n_dial = 0, n_dtmf_feed = 0, n_rb_on = 0, n_rb_off = 0, n_ring_edges = 0;
  int n_voice = 0, n_busy_on = 0, n_busy_off = 0, n_music = 0, n_timeout = 0;
  int n_records = 0, n_digits_ok = 0, n_tp_ok = 0;
  int last_music = -1;
  logic [N_USERS-1:0] ring_q = '0;
  call_record_t recs [4];

  function automatic logic [7:0] voice(int u, int f);
    return 8'(37 * f + 71 * u + 5);
  endfunction

  function automatic logic [7:0] mus(int i);
    return 8'(i * 5 + 1);
  endfunction

  function automatic bit is_sine(logic [7:0] b);
    foreach (sine[i]) if (sine[i] == b) return 1;
    return 0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (frame %0d)", what, frame);
    end
  endtask

  // Bus timing from the testbench's own clock count.
  always_comb begin
    int b;
    b = (c < 0) ? 0 : (c / 2) % 256;
    pos = (b + 255) % 256;
    frame = (c < 0) ? -1 : (c / 2 + 255) / 256 - 1;
    // the users' codecs: user u talks in slot u
    dx_i = (frame >= 0 && pos / 8 < N_USERS) ? voice(pos / 8, frame)[7 - pos % 8] : 1'b0;
  end

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bus monitor and per-frame checks.
  always @(posedge clk) if (rst_n) begin
    if (c >= 0) begin
      // TP pulses: TP(k+1) high in bit period 8k
      if ((c % 2) == 0 && ((c / 2) % 8) == 0) begin
        if (tp == (32'b1 << ((c / 2) % 256 / 8))) n_tp_ok++;
        else check(0, "TP pulse position");
      end
      if ((c % 2) == 1 && frame >= 0 && frame < MAXF) begin
        dxsh = {dxsh[6:0], dx_oe ? dx_o : dx_i};
        drsh = {drsh[6:0], dr};
        if (pos % 8 == 7) begin
          dxb[frame][pos / 8] = dxsh;
          drb[frame][pos / 8] = drsh;
        end
      end
      if ((c % 2) == 0 && pos == 0 && frame >= 0 && frame < MAXF) begin
        for (int u = 0; u < N_USERS; u++) st_at[frame][u] = user_state[u];
        if (frame >= 3) check_frame(frame - 1);
      end
    end
    for (int u = 0; u < N_USERS; u++) begin
      if (ring[u] != ring_q[u]) begin
        check(user_state[u] == ST_Z2, "ringing only while rung");
        n_ring_edges++;
      end
    end
    ring_q <= ring;
    if (rec_valid && n_records < 4) begin
      recs[n_records] = rec;
      n_records++;
    end
    c <= c + 1;
  end

  task automatic check_frame(int f);
    for (int u = 0; u < N_USERS; u++) begin
      user_state_t s;
      logic [7:0] got, dtmf;
      s = st_at[f][u];
      if (st_at[f - 1][u] != s || st_at[f + 1][u] != s) continue;
      got = drb[f][u];
      dtmf = drb[f][DTMF_SLOT0 + u];
      unique case (s)
        ST_Z1: begin
          check(got == dxb[f - 1][DIAL_SLOT] && is_sine(got), "dial tone in user slot");
          check(dtmf == dxb[f - 1][u] && dtmf == voice(u, f - 1), "user voice to DTMF slot");
          n_dial++;
          n_dtmf_feed++;
        end
        ST_B: begin
          check(got == IDLE_CODE, "silence while dialling");
          check(dtmf == voice(u, f - 1), "user voice to DTMF slot while dialling");
          n_dtmf_feed++;
        end
        ST_H: begin
          check(got == dxb[f - 1][RB_SLOT], "ring-back slot copied");
          check(dtmf == IDLE_CODE, "no DTMF feed while ringing");
          if (poly_en) begin
            bit found = 0;
            for (int i = 0; i < MUS_DEPTH; i++)
              if (got == mus(i)) begin
                found = 1;
                if (last_music >= 0)
                  check(i == (last_music + 1) % MUS_DEPTH, "music plays in order");
                last_music = i;
              end
            check(found, "music sample in ring-back slot");
            n_music++;
          end else if (got == IDLE_CODE) n_rb_off++;
          else begin
            check(is_sine(got), "ring-back is the 450 Hz sine");
            n_rb_on++;
          end
        end
        ST_T: begin
          check(got == dxb[f - 1][peer[u]] && got == voice(peer[u], f - 1), "voice exchanged");
          n_voice++;
        end
        ST_M: begin
          check(got == dxb[f - 1][BUSY_SLOT], "busy slot copied");
          if (got == IDLE_CODE) n_busy_off++;
          else begin
            check(is_sine(got), "busy tone is the 450 Hz sine");
            n_busy_on++;
          end
        end
        default: begin
          check(got == IDLE_CODE && dtmf == IDLE_CODE, "idle user slot");
        end
      endcase
    end
  endtask

  task automatic frames(int n);
    repeat (512 * n) @(posedge clk);
    #1;
  endtask

  task automatic key(int u, logic [3:0] code);
    dtmf_q[u] = code;
    repeat (5) @(posedge clk);
    #1 dtmf_le_n[u] = 1'b0;
    repeat (40) @(posedge clk);
    #1 dtmf_le_n[u] = 1'b1;
    repeat (40) @(posedge clk);
    #1;
  endtask

  task automatic dial(int u, logic [15:0] num);
    for (int k = 3; k >= 0; k--) key(u, num[4*k +: 4]);
    if (dialled[u] == num) n_digits_ok++;
    else check(0, "dialled digits");
  endtask

  initial begin
    for (int u = 0; u < N_USERS; u++) begin
      user_number[u] = {4'h8, 4'hA, 4'hA, 4'(u + 1)};
      dtmf_q[u] = '0;
      peer[u] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    frames(4);

    // user 1 calls user 2
    hook_off[0] = 1'b1;
    frames(6);
    dial(0, 16'h8AA2);
    frames(2);
    check(user_state[0] == ST_H && user_state[1] == ST_Z2, "call set up");
    frames(250);
    hook_off[1] = 1'b1;
    peer[0] = 1; peer[1] = 0;
    frames(30);
    check(user_state[0] == ST_T && user_state[1] == ST_T, "in conversation");
    hook_off[1] = 1'b0;
    frames(50);
    check(user_state[0] == ST_M, "busy after far end hangs up");
    hook_off[0] = 1'b0;
    frames(3);
    check(n_records == 1 && recs[0].caller == 0 && recs[0].callee == 1, "call record");

    // polyphonic ring-back: user 3 calls user 4
    for (int i = 0; i < MUS_DEPTH; i++) begin
      mus_we = 1'b1; mus_addr = 6'(i); mus_data = mus(i);
      @(posedge clk); #1;
    end
    mus_we = 1'b0;
    poly_en = 1'b1;
    hook_off[2] = 1'b1;
    frames(4);
    dial(2, 16'h8AA4);
    frames(90);
    check(user_state[2] == ST_H, "user 3 hears ring-back");
    hook_off[3] = 1'b1;
    peer[2] = 3; peer[3] = 2;
    frames(10);
    hook_off[2] = 1'b0;
    frames(5);
    check(user_state[3] == ST_M, "user 4 busy after caller hangs up");
    hook_off[3] = 1'b0;
    poly_en = 1'b0;
    frames(3);

    // no-dial timeout
    hook_off[1] = 1'b1;
    frames(NO_DIAL + 10);
    if (user_state[1] == ST_M) n_timeout++;
    frames(25);
    hook_off[1] = 1'b0;
    frames(3);
    for (int u = 0; u < N_USERS; u++) check(user_state[u] == ST_G, "all on-hook at end");

    $display("mechanisms: tp=%0d dial=%0d dtmf_feed=%0d digits=%0d rb_on=%0d rb_off=%0d ring_edges=%0d voice=%0d busy_on=%0d busy_off=%0d music=%0d timeout=%0d records=%0d",
             n_tp_ok, n_dial, n_dtmf_feed, n_digits_ok, n_rb_on, n_rb_off, n_ring_edges, n_voice,
             n_busy_on, n_busy_off, n_music, n_timeout, n_records);
    check(n_tp_ok > 0, "slot pulses seen");
    check(n_dial > 0, "dial tone heard");
    check(n_dtmf_feed > 0, "DTMF feed routed");
    check(n_digits_ok == 2, "digits captured");
    check(n_rb_on > 0 && n_rb_off > 0, "ring-back on and off periods");
    check(n_ring_edges > 0, "25 Hz ringing");
    check(n_voice > 0, "voice exchanged");
    check(n_busy_on > 0 && n_busy_off > 0, "busy on and off periods");
    check(n_music > 0, "polyphonic ring-back");
    check(n_timeout == 1, "no-dial timeout");
    check(n_records == 2, "two call records");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
