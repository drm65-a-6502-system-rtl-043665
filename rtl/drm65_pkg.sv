// drm65_pkg: constants shared by the DRM65 system logic.
// Holds the I/O register offsets of the $E000-$E00F peripheral window and
// the VGA timing numbers. HC=0/VC=0 is the first displayed pixel of the
// 512x400 window; the rest of the 640x480@60 raster (borders, porches and
// sync) follows it, so the horizontal sync starts 208 clocks before the
// next visible line, as the PWM description of the system requires.
package drm65_pkg;
  // I/O register offsets (address bits 3:0 inside $E000-$E00F)
  localparam logic [3:0] R_UART   = 4'h0;  // W: UTXD   R: URXD
  localparam logic [3:0] R_BORDER = 4'h1;  // W: BORDER R: USTAT
  localparam logic [3:0] R_CTRL1  = 4'h2;  // W: CTRL1  R: STAT1
  localparam logic [3:0] R_CTRL2  = 4'h3;  // W: CTRL2  R: STAT2
  localparam logic [3:0] R_PINOUT = 4'h4;  // W/R: PINOUT
  localparam logic [3:0] R_PAL0   = 4'h5;  // W: PAL0   R: PININ
  localparam logic [3:0] R_PAL1   = 4'h6;  // W: PAL1
  localparam logic [3:0] R_PWM    = 4'h7;  // W: PWM    R: KBD
  // PAGE0..PAGE6 live at offsets 8..14

  // Horizontal timing in 25 MHz pixel clocks, counted from the first
  // displayed pixel: 512 displayed, 64 right border, 16 front porch,
  // 96 sync, 48 back porch, 64 left border.
  localparam int H_DISP    = 512;
  localparam int H_BLK_BEG = 576;
  localparam int H_SYN_BEG = 592;
  localparam int H_SYN_END = 688;
  localparam int H_BLK_END = 736;
  localparam int H_TOTAL   = 800;
  // Vertical timing in lines: 400 displayed, 40 bottom border, 10 front
  // porch, 2 sync, 33 back porch, 40 top border.
  localparam int V_DISP    = 400;
  localparam int V_BLK_BEG = 440;
  localparam int V_SYN_BEG = 450;
  localparam int V_SYN_END = 452;
  localparam int V_BLK_END = 485;
  localparam int V_TOTAL   = 525;

  // Palette colour
  typedef struct packed {
    logic [3:0] g;
    logic [3:0] r;
    logic [3:0] b;
  } rgb_t;
endpackage
