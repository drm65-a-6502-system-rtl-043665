// video_shifter: pixel serializer shared by both video modes.
// Sixteen flip-flops, organised as four 4-bit shift registers sr[3:0], are
// wired in one of two ways by the mode bit, as in the original design:
//  * 1 bpp (vmod=0): the four registers form one 16-bit chain, sr[3] at the
//    head. The word is loaded in mixed-endian order, low byte (even address)
//    first and MSB first, then the high byte. The chain shifts every clock,
//    and the head bit is widened to palette index 0 or 15.
//  * 4 bpp (vmod=1): each register holds one bit plane. Register b holds bit
//    b of the four pixels, first pixel at the head, so the four heads together
//    form the pixel. The pixel order is the high nibble of the low byte first.
//    The registers shift only on even HC (odd = 0), so each pixel is shown for
//    two clocks, which halves the horizontal resolution.
// Timing: load is the fetch strobe of cycle HC=k; the first pixel of that
// word is on 'pixel' during HC=k+1 (one clock of pipeline delay). Without new
// loads the registers fill with zeros.
module video_shifter (
  input  logic        clk,
  input  logic        load,
  input  logic        vmod,
  input  logic        odd,
  input  logic [15:0] data,
  output logic [3:0]  pixel
);
  logic [3:0][3:0] sr;     // sr[b][3] is the head of register b
  logic [15:0]     ord;    // word in display order

  assign ord = {data[7:0], data[15:8]};

  always_ff @(posedge clk) begin
    if (load) begin
      if (vmod) begin
        // pixel p is ord[15-4p -: 4]; its bit b goes to sr[b][3-p]
        for (int p = 0; p < 4; p++)
          for (int b = 0; b < 4; b++)
            sr[b][3 - p] <= ord[15 - 4 * p - (3 - b)];
      end else begin
        sr <= {ord[15:12], ord[11:8], ord[7:4], ord[3:0]};
      end
    end else if (!vmod) begin
      sr <= {sr[3][2:0], sr[2][3],
             sr[2][2:0], sr[1][3],
             sr[1][2:0], sr[0][3],
             sr[0][2:0], 1'b0};
    end else if (!odd) begin
      for (int b = 0; b < 4; b++) sr[b] <= {sr[b][2:0], 1'b0};
    end
  end

  assign pixel = vmod ? {sr[3][3], sr[2][3], sr[1][3], sr[0][3]} : {4{sr[3][3]}};
endmodule
