// video_palette: 16-entry colour lookup with border and blanking logic.
// A small RAM with separate read and write ports maps a 4-bit index to a
// 12-bit colour stored as {green, red, blue}. The read index is the pixel
// while dv is high, otherwise the BORDER register entry. The RAM read is
// registered (one clock), and blk is delayed by the same clock and then
// forces black, since VGA monitors misbehave on colour during retrace.
// Inputs pixel/dv/blk must be aligned (the shifter's clock of delay);
// the colour appears one clock later. Entries start at black (this design's
// choice); the border select, forced black and the one-clock RAM follow the
// original design.
module video_palette
  import drm65_pkg::*;
#(
  parameter int ENTRIES = 16
) (
  input  logic                       clk,
  input  logic [$clog2(ENTRIES)-1:0] pixel,
  input  logic                       dv,
  input  logic                       blk,
  input  logic [$clog2(ENTRIES)-1:0] border,
  input  logic                       we,
  input  logic [$clog2(ENTRIES)-1:0] waddr,
  input  logic [11:0]                wdata,
  output logic [3:0]                 r,
  output logic [3:0]                 g,
  output logic [3:0]                 b
);
  rgb_t mem [ENTRIES];
  rgb_t q;
  logic blk_q;

  initial for (int i = 0; i < ENTRIES; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= rgb_t'(wdata);
    q     <= mem[dv ? pixel : border];
    blk_q <= blk;
  end

  always_comb begin
    r = blk_q ? 4'h0 : q.r;
    g = blk_q ? 4'h0 : q.g;
    b = blk_q ? 4'h0 : q.b;
  end
endmodule
