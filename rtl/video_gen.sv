// video_gen: DRM65 video generator.
// Chains the raster timing, the video address generator, the pixel shifter
// and the palette. Each fetch reads one 16-bit word from the external SRAM
// (through ext_mem_if, which steals the cycle from the CPU if needed) and
// loads it into the shifter at the end of that cycle.
// Pipeline: counters (HC=k) -> shifter output (k+1) -> palette RAM (k+2).
// dv and blk are delayed one clock to meet the pixel at the palette input,
// which adds the second clock, and the sync pins are delayed two clocks so
// they stay aligned with the colour. hsync_n/vsync_n and hc are also given
// undelayed, for the status register, interrupts, PWM and keyboard sampling.
// Modes: vmod=0 512x400 1 bpp (index 0 or 15), vmod=1 256x200 4 bpp.
// Delaying the sync pins with the colour is this design's choice.
module video_gen (
  input  logic        clk,
  input  logic        rst,
  input  logic        vmod,
  input  logic [3:0]  border,
  input  logic        pal_we,
  input  logic [3:0]  pal_waddr,
  input  logic [11:0] pal_wdata,
  output logic        fetch,
  output logic [15:0] vaddr,
  input  logic [15:0] vdata,
  output logic [9:0]  hc,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic [3:0]  r,
  output logic [3:0]  g,
  output logic [3:0]  b,
  output logic        vga_hs_n,
  output logic        vga_vs_n
);
  logic [9:0] vc;
  logic       dv, blk;
  logic       dv_d, blk_d;
  logic [1:0] hs_d, vs_d;
  logic [3:0] pixel;

  video_timing u_timing (
    .clk, .rst, .hc, .vc, .dv, .blk, .hsync_n, .vsync_n
  );

  video_addr_gen u_addr (
    .hc, .vc, .dv, .vmod, .fetch, .vaddr
  );

  video_shifter u_shift (
    .clk, .load(fetch), .vmod, .odd(hc[0]), .data(vdata), .pixel
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      dv_d  <= 1'b0;
      blk_d <= 1'b1;
      hs_d  <= 2'b11;
      vs_d  <= 2'b11;
    end else begin
      dv_d  <= dv;
      blk_d <= blk;
      hs_d  <= {hs_d[0], hsync_n};
      vs_d  <= {vs_d[0], vsync_n};
    end
  end

  assign vga_hs_n = hs_d[1];
  assign vga_vs_n = vs_d[1];

  video_palette #(.ENTRIES(16)) u_pal (
    .clk, .pixel, .dv(dv_d), .blk(blk_d), .border,
    .we(pal_we), .waddr(pal_waddr), .wdata(pal_wdata), .r, .g, .b
  );
endmodule
