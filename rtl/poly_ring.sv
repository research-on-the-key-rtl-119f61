// poly_ring: music store for the polyphonic ring-back.
//
// Holds DEPTH PCM samples of music or a greeting taken every 125 us. The
// default, 80,000 samples, is the document's count (it also speaks of 20 s,
// which at 8 kHz would be twice as many samples; the count is followed). While `play` is high the read
// address steps by one at every frame_tick and wraps at the end, so one sample
// is supplied per frame for the ring-back time slot; when `play` drops the
// address returns to the start, so each ring-back period begins the music
// from its beginning (this design's choice). The samples are loaded through a
// simple write port (one byte per clock with we) from whatever downloads them;
// the document stores them in advance but does not say how. The read is
// synchronous: `code` shows the sample at the current address one clock after
// the address changes.
module poly_ring #(
  parameter int DEPTH = 80000,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_tick,
  input  logic          play,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  output logic [7:0]    code
);

  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] raddr;

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_ff @(posedge clk)
    code <= mem[raddr];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                raddr <= '0;
    else if (!play)            raddr <= '0;
    else if (frame_tick)       raddr <= (raddr == AW'(DEPTH - 1)) ? '0 : raddr + 1'b1;

endmodule
