// tb_tsi_switch: drives the switch with the bus timing of the frame (a
// counter kept by the testbench), sends a random byte in every DX slot of
// every frame, changes the connection table to a random one every frame, and
// checks every DR slot: it must carry the byte that the routed DX slot held
// in the previous frame, or the idle code if the entry is disabled. This is
// the one-frame delay of the switch.
module tb_tsi_switch;
  import spc_pkg::*;

  localparam int FRAMES = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [SLOT_W-1:0] dslot;
  logic [2:0] dbit;
  logic bit_sample;
  logic dx, dr;
  route_t route [N_SLOTS];
  int checks = 0, failures = 0;

  logic [7:0] txb   [FRAMES+2][N_SLOTS];
  route_t     rtab  [FRAMES+2][N_SLOTS];
  int c = 0;       // clock counter since reset
  int frame;       // data frame index
  logic [7:0] rxsh;

  tsi_switch dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bus timing derived from c: bit period c/2, data position one bit later.
  always_comb begin
    int p;
    p = ((c / 2) + 255) % 256;
    dslot = SLOT_W'(p / 8);
    dbit = 3'(p % 8);
    bit_sample = (c % 2) == 1;
    frame = (c / 2 + 255) / 256 - 1;   // -1 before the first data frame
    dx = (frame >= 0 && frame < FRAMES + 2) ? txb[frame][p / 8][7 - p % 8] : 1'b0;
    for (int s = 0; s < N_SLOTS; s++)
      // the table for frame f is applied from slot 31 of frame f-1
      route[s] = (frame + 1 >= 0 && frame + 1 < FRAMES + 2 && p >= 31 * 8) ? rtab[frame + 1][s]
               : (frame >= 0 && frame < FRAMES + 2) ? rtab[frame][s] : '0;
  end

  initial begin
    for (int f = 0; f < FRAMES + 2; f++)
      for (int s = 0; s < N_SLOTS; s++) begin
        txb[f][s] = 8'($urandom);
        rtab[f][s].en  = ($urandom % 4) != 0;
        rtab[f][s].src = SLOT_W'($urandom);
      end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    forever begin
      @(posedge clk);
      if (bit_sample) begin
        rxsh = {rxsh[6:0], dr};
        if (dbit == 3'd7 && frame >= 1 && frame < FRAMES) begin
          logic [7:0] e;
          route_t r;
          r = rtab[frame][dslot];
          e = r.en ? txb[frame - 1][r.src] : IDLE_CODE;
          checks++;
          if (rxsh != e) begin
            failures++;
            if (failures < 10)
              $display("FAIL frame %0d slot %0d: got %h expected %h", frame, dslot, rxsh, e);
          end
        end
      end
      #1 c++;
      if (frame == FRAMES) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
