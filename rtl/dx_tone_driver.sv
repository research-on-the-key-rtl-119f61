// dx_tone_driver: puts the tone bytes on the DX bus.
//
// The exchange core itself is a talker on DX: in time slot TP9 it sends the
// dial tone byte, in TP10 the ring-back (or music) byte and in TP11 the busy
// tone byte, so that the switch can copy them to any user like voice. This
// block fetches the byte for the next slot on the last clock of each slot and
// shifts it out MSB first; dx_oe is high for the three tone slots only, and
// the board's DX bus is driven by dx_o while dx_oe is high. The slot numbers
// follow the document's figures (TP10 ring-back, TP11 busy).
module dx_tone_driver
  import spc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [SLOT_W-1:0] dslot,
  input  logic [2:0]        dbit,
  input  logic              bit_sample,
  input  logic [7:0]        dial_code,
  input  logic [7:0]        rb_code,
  input  logic [7:0]        busy_code,
  output logic              dx_o,
  output logic              dx_oe
);

  logic [7:0]        tx_byte;
  logic [SLOT_W-1:0] nslot;

  assign nslot = dslot + 1'b1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tx_byte <= IDLE_CODE;
    else if (bit_sample && dbit == 3'd7)
      unique case (nslot)
        DIAL_SLOT: tx_byte <= dial_code;
        RB_SLOT:   tx_byte <= rb_code;
        BUSY_SLOT: tx_byte <= busy_code;
        default:   tx_byte <= IDLE_CODE;
      endcase

  assign dx_o  = tx_byte[3'd7 - dbit];
  assign dx_oe = (dslot == DIAL_SLOT) || (dslot == RB_SLOT) || (dslot == BUSY_SLOT);

endmodule
