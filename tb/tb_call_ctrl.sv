// tb_call_ctrl: plays call scenarios against the call controller with short
// timers (frame tick every 8 clocks, 4 frames per "second") and checks the
// user states, the ringing outputs, the switch connection table and the call
// records against values worked out by hand for each step: a complete call
// with conversation and hang-up, the no-dial and no-answer timeouts, a wrong
// number, a busy number, calling oneself, a caller giving up while ringing,
// and the caller hanging up first.
module tb_call_ctrl;
  import spc_pkg::*;

  localparam int NO_DIAL = 20, NO_ANSWER = 30, FPS = 4;

  logic clk = 1'b0, rst_n = 1'b0, frame_tick = 1'b0;
  logic [N_USERS-1:0] hook_off = '0, digit_valid = '0, ringing;
  logic [3:0]  digit [N_USERS];
  logic [15:0] user_number [N_USERS];
  user_state_t state [N_USERS];
  logic [15:0] dialled [N_USERS];
  route_t route [N_SLOTS];
  logic rec_valid;
  call_record_t rec;
  int checks = 0, failures = 0;
  int nrec = 0;
  call_record_t recs [8];
  int ck = 0;
  int d_seen = 0;

  call_ctrl #(.NO_DIAL(NO_DIAL), .NO_ANSWER(NO_ANSWER), .FRAMES_PER_SEC(FPS)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    ck <= ck + 1;
    frame_tick <= (ck % 8) == 7;
    if (rst_n && state[0] == ST_D) d_seen <= d_seen + 1;
    if (rst_n && rec_valid && nrec < 8) begin
      recs[nrec] <= rec;
      nrec <= nrec + 1;
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic clocks(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic frames(input int n);
    clocks(8 * n);
  endtask

  task automatic hook(input int u, input bit off);
    hook_off[u] = off;
    clocks(4);
  endtask

  task automatic press(input int u, input logic [3:0] d);
    digit[u] = d;
    digit_valid[u] = 1'b1;
    clocks(1);
    digit_valid[u] = 1'b0;
    clocks(3);
  endtask

  task automatic dial(input int u, input logic [15:0] num);
    for (int k = 3; k >= 0; k--) press(u, num[4*k +: 4]);
  endtask

  function automatic bit rt(int s, bit en, int src);
    return route[s].en == en && (!en || route[s].src == SLOT_W'(src));
  endfunction

  function automatic bit quiet_routes();
    for (int s = 0; s < N_SLOTS; s++) if (route[s].en) return 0;
    return 1;
  endfunction

  initial begin
    for (int u = 0; u < N_USERS; u++) begin
      user_number[u] = {4'h8, 4'hA, 4'hA, 4'(u + 1)};
      digit[u] = '0;
    end
    clocks(3);
    rst_n = 1'b1;
    clocks(2);
    for (int u = 0; u < N_USERS; u++) check(state[u] == ST_G, "reset state G");
    check(quiet_routes(), "no routes at rest");

    // --- complete call 1 -> 2 ---
    hook(0, 1);
    check(state[0] == ST_Z1, "off-hook gives Z1");
    check(rt(0, 1, 8) && rt(4, 1, 0), "dial tone to slot 0, voice to DTMF slot 4");
    press(0, 4'h8);
    check(state[0] == ST_B, "first digit gives B");
    check(rt(0, 0, 0) && rt(4, 1, 0), "dialling: tone off, DTMF feed on");
    press(0, 4'hA); press(0, 4'hA); press(0, 4'h2);
    check(state[0] == ST_D || (state[0] == ST_H && state[1] == ST_Z2), "fourth digit gives D (or H if a frame tick has passed)");
    check(dialled[0] == 16'h8AA2, "dialled number kept");
    frames(1);
    check(state[0] == ST_H && state[1] == ST_Z2, "caller H, callee Z2");
    check(ringing == 4'b0010, "callee rung");
    check(rt(0, 1, 9) && rt(1, 0, 0) && rt(4, 0, 0), "ring-back routed to caller");
    frames(3);
    hook(1, 1);
    check(state[0] == ST_T && state[1] == ST_T, "answer gives T for both");
    check(ringing == 4'b0000, "ringing stops");
    check(rt(0, 1, 1) && rt(1, 1, 0), "voice crossed between slots 0 and 1");
    frames(3 * FPS + 1);
    hook(1, 0);
    check(state[1] == ST_G && state[0] == ST_M, "callee hangs up: caller busy");
    check(rt(0, 1, 10) && rt(1, 0, 0), "busy tone routed to caller");
    clocks(2);
    check(nrec == 1, "one call record");
    check(recs[0].caller == 0 && recs[0].callee == 1 && recs[0].seconds == 16'd3, "record 0->1, 3 s");
    hook(0, 0);
    check(state[0] == ST_G && quiet_routes(), "both on-hook");

    // --- no-dial timeout ---
    hook(2, 1);
    check(state[2] == ST_Z1, "user 3 off-hook");
    frames(NO_DIAL - 2);
    check(state[2] == ST_Z1, "still dial tone before timeout");
    frames(4);
    check(state[2] == ST_M && rt(2, 1, 10), "no-dial timeout gives busy tone");
    hook(2, 0);

    // --- no digit after the first one ---
    hook(2, 1);
    press(2, 4'h8);
    frames(NO_DIAL - 2);
    check(state[2] == ST_B, "still dialling");
    frames(4);
    check(state[2] == ST_M, "inter-digit timeout gives busy tone");
    hook(2, 0);

    // --- wrong number ---
    hook(3, 1);
    dial(3, 16'h1234);
    frames(1);
    check(state[3] == ST_M, "unknown number gives busy");
    hook(3, 0);

    // --- own number ---
    hook(0, 1);
    dial(0, 16'h8AA1);
    frames(1);
    check(state[0] == ST_M, "own number gives busy");
    hook(0, 0);

    // --- busy callee ---
    hook(1, 1);
    hook(0, 1);
    dial(0, 16'h8AA2);
    frames(1);
    check(state[0] == ST_M && state[1] == ST_Z1, "off-hook callee gives busy");
    hook(0, 0); hook(1, 0);

    // --- no answer ---
    hook(0, 1);
    dial(0, 16'h8AA3);
    frames(1);
    check(state[0] == ST_H && state[2] == ST_Z2, "ringing user 3");
    frames(NO_ANSWER - 2);
    check(state[0] == ST_H, "still ringing");
    frames(4);
    check(state[0] == ST_M && state[2] == ST_G, "no-answer timeout");
    hook(0, 0);

    // --- caller gives up ---
    hook(1, 1);
    dial(1, 16'h8AA4);
    frames(1);
    check(state[1] == ST_H && state[3] == ST_Z2 && ringing == 4'b1000, "user 2 rings user 4");
    check(rt(1, 1, 9), "ring-back routed to user 2");
    hook(1, 0);
    check(state[1] == ST_G && state[3] == ST_G && ringing == 4'b0000, "abandon frees callee");

    // --- caller hangs up first ---
    hook(3, 1);
    dial(3, 16'h8AA3);
    frames(1);
    hook(2, 1);
    check(state[3] == ST_T && state[2] == ST_T && rt(3, 1, 2) && rt(2, 1, 3), "call 4 -> 3");
    frames(FPS + 1);
    hook(3, 0);
    check(state[3] == ST_G && state[2] == ST_M, "caller hangs up: callee busy");
    clocks(2);
    check(nrec == 2 && recs[1].caller == 3 && recs[1].callee == 2 && recs[1].seconds == 16'd1,
          "record 4->3, 1 s");
    hook(2, 0);
    check(state[2] == ST_G, "all on-hook");

    check(d_seen > 0, "wait state D was passed through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
