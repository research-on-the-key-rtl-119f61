// tb_dx_tone_driver: runs the bus timing, changes the three tone bytes at the
// start of every frame, and checks that DX is driven exactly in slots
// TP9, TP10 and TP11, each carrying its tone byte MSB first.
module tb_dx_tone_driver;
  import spc_pkg::*;

  localparam int FRAMES = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [SLOT_W-1:0] dslot;
  logic [2:0] dbit;
  logic bit_sample;
  logic [7:0] dial_code, rb_code, busy_code;
  logic dx_o, dx_oe;
  int checks = 0, failures = 0;
  int c = 0;
  int frame;
  logic [7:0] codes [FRAMES+1][3];
  logic [7:0] sh;
  int oe_bits;

  dx_tone_driver dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb begin
    int p;
    p = ((c / 2) + 255) % 256;
    dslot = SLOT_W'(p / 8);
    dbit = 3'(p % 8);
    bit_sample = (c % 2) == 1;
    frame = (c / 2 + 255) / 256 - 1;
    if (frame >= 0 && frame <= FRAMES) begin
      dial_code = codes[frame][0];
      rb_code   = codes[frame][1];
      busy_code = codes[frame][2];
    end else begin
      dial_code = '0; rb_code = '0; busy_code = '0;
    end
  end

  initial begin
    for (int f = 0; f <= FRAMES; f++)
      for (int k = 0; k < 3; k++) codes[f][k] = 8'($urandom);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    forever begin
      @(posedge clk);
      if (bit_sample && frame >= 0) begin
        bit tone_slot;
        tone_slot = dslot == 5'd8 || dslot == 5'd9 || dslot == 5'd10;
        checks++;
        if (dx_oe != tone_slot) begin
          failures++;
          $display("FAIL dx_oe=%b in slot %0d", dx_oe, dslot);
        end
        if (dx_oe) oe_bits++;
        sh = {sh[6:0], dx_o};
        if (dbit == 3'd7 && tone_slot) begin
          checks++;
          if (sh != codes[frame][dslot - 8]) begin
            failures++;
            $display("FAIL frame %0d slot %0d: %h vs %h", frame, dslot, sh, codes[frame][dslot - 8]);
          end
        end
      end
      #1 c++;
      if (frame == FRAMES) begin
        checks++;
        if (oe_bits != 24 * FRAMES) failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
