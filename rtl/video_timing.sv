// video_timing: VGA 640x480@60 raster timing with a 512x400 active window.
// Two 10-bit counters: HC counts 0..799 pixel clocks (25 MHz), VC counts
// 0..524 lines and advances when HC wraps. Comparators derive:
//   dv      high in the 512x400 displayed window (HC<512, VC<400)
//   blk     high in horizontal or vertical retrace (porches plus sync)
//   hsync_n low for HC 592..687, vsync_n low for VC 450..451 (active low)
// When dv and blk are both low the border colour is shown. Counter origin is
// the first displayed pixel, which makes the video address a plain
// concatenation of counter bits. All outputs are combinational decodes of
// the counter registers, so they change one clock after each count.
// The 640x480 raster, the 512x400 window and the two counters follow the
// original design; the placement of the window (even borders, origin at the
// first pixel) is this design's, chosen to match the PWM timing it implies.
module video_timing
  import drm65_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  output logic [9:0] hc,
  output logic [9:0] vc,
  output logic       dv,
  output logic       blk,
  output logic       hsync_n,
  output logic       vsync_n
);
  always_ff @(posedge clk) begin
    if (rst) begin
      hc <= '0;
      vc <= '0;
    end else if (hc == 10'(H_TOTAL - 1)) begin
      hc <= '0;
      vc <= (vc == 10'(V_TOTAL - 1)) ? '0 : vc + 10'd1;
    end else begin
      hc <= hc + 10'd1;
    end
  end

  always_comb begin
    dv      = (hc < 10'(H_DISP)) && (vc < 10'(V_DISP));
    blk     = (hc >= 10'(H_BLK_BEG) && hc < 10'(H_BLK_END)) ||
              (vc >= 10'(V_BLK_BEG) && vc < 10'(V_BLK_END));
    hsync_n = !(hc >= 10'(H_SYN_BEG) && hc < 10'(H_SYN_END));
    vsync_n = !(vc >= 10'(V_SYN_BEG) && vc < 10'(V_SYN_END));
  end
endmodule
