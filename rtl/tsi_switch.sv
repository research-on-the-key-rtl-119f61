// tsi_switch: time-slot interchange between the DX and DR serial buses.
//
// Every codec sends its byte on DX in its own time slot and receives on DR in
// its own slot. This block shifts all 32 DX slots of a frame into a speech
// memory and, during the next frame, sends in each DR slot the byte stored
// for the DX slot named by that slot's connection-table entry (route). A
// connection therefore costs exactly one frame: what user 2 says in frame f is
// heard by user 1 in frame f+1. Voice, tones and DTMF feeds all pass the same
// way; a slot whose entry is disabled carries the idle code.
//
// The speech memory has two banks of 32 bytes: one is written during a frame
// while the other, written in the frame before, is read; they swap at the end
// of slot 31. DX is sampled in the second clock of each bit (bit_sample). The
// byte for a DR slot is fetched on the last clock of the slot before it and
// shifted out MSB first from the first clock of each bit (bit_start).
// Route entries are read at that fetch, so a table change takes effect from
// the next slot. The double-buffered memory is this design's choice; the
// document gives the copying between slots and the one-frame delay.
module tsi_switch
  import spc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [SLOT_W-1:0] dslot,
  input  logic [2:0]        dbit,
  input  logic              bit_sample,
  input  logic              dx,
  input  route_t            route [N_SLOTS],
  output logic              dr
);

  logic [7:0]        mem [2][N_SLOTS];
  logic              wbank;
  logic [6:0]        sh;
  logic [7:0]        rx_byte;
  logic [7:0]        tx_byte;
  logic              slot_end;
  logic [SLOT_W-1:0] nslot;
  logic              rbank;
  route_t            nroute;

  assign rx_byte  = {sh, dx};
  assign slot_end = bit_sample && (dbit == 3'd7);
  assign nslot    = dslot + 1'b1;
  // After slot 31 the bank written in this frame becomes the read bank.
  assign rbank    = (dslot == SLOT_W'(N_SLOTS - 1)) ? wbank : ~wbank;
  assign nroute   = route[nslot];

  always_ff @(posedge clk)
    if (slot_end) mem[wbank][dslot] <= rx_byte;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wbank   <= 1'b0;
      sh      <= '0;
      tx_byte <= IDLE_CODE;
    end else if (bit_sample) begin
      sh <= rx_byte[6:0];
      if (slot_end) begin
        if (dslot == SLOT_W'(N_SLOTS - 1)) wbank <= ~wbank;
        if (!nroute.en)
          tx_byte <= IDLE_CODE;
        else if (rbank == wbank && nroute.src == dslot)
          tx_byte <= rx_byte;           // byte being written on this clock
        else
          tx_byte <= mem[rbank][nroute.src];
      end
    end

  assign dr = tx_byte[3'd7 - dbit];

endmodule
