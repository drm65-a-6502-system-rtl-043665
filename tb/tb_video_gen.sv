// tb_video_gen: a video memory model returns a hashed word for each fetched
// address. After loading a random palette, one frame is checked pixel by
// pixel in each mode against a model of the raster: colour two clocks after
// the counters (black in retrace, border entry outside the 512x400 window,
// else the palette entry of the pixel), syncs delayed likewise, and the
// number of fetches per frame (12800 in 1 bpp, 25600 in 4 bpp).
module tb_video_gen;
  logic clk = 0, rst, vmod, pal_we, fetch, hsync_n, vsync_n, vga_hs_n, vga_vs_n;
  logic [3:0] border, pal_waddr, r, g, b;
  logic [11:0] pal_wdata;
  logic [15:0] vaddr, vdata;
  logic [9:0] hc;
  logic [11:0] pal [16];
  int checks = 0, failures = 0;

  video_gen dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] word_at(input int a);
    return 16'((a * 40503) ^ (a >> 3) ^ 16'h5A3C);
  endfunction

  assign vdata = word_at(int'(vaddr));

  function automatic logic [11:0] expected(input int x, input int y, input logic m);
    logic [15:0] w, ord;
    logic [3:0] idx;
    if ((x >= 576 && x < 736) || (y >= 440 && y < 485)) return 12'h000;
    if (!(x < 512 && y < 400)) return pal[border];
    if (!m) begin
      w = word_at(y * 32 + x / 16);
      ord = {w[7:0], w[15:8]};
      idx = {4{ord[15 - x % 16]}};
    end else begin
      w = word_at((y / 2) * 64 + x / 8);
      ord = {w[7:0], w[15:8]};
      idx = ord[15 - 4 * ((x % 8) / 2) -: 4];
    end
    return pal[idx];
  endfunction

  task automatic chk(input logic cond, input string what, input int x, input int y);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s at x=%0d y=%0d rgb=%h%h%h", what, x, y, r, g, b);
    end
  endtask

  initial begin
    rst = 1; vmod = 0; border = 4'd3; pal_we = 0; pal_waddr = 0; pal_wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      pal_we = 1; pal_waddr = 4'(i); pal_wdata = 12'($urandom) | 12'h001; pal[i] = pal_wdata;
      @(negedge clk);
    end
    pal_we = 0;
    for (int m = 0; m < 2; m++) begin
      int nf;
      vmod = m[0];
      rst = 1; @(negedge clk); rst = 0;
      nf = 0;
      // cycle t has hc = t % 800; colour of cycle t-2 shows in cycle t
      for (int t = 0; t < 800 * 525 + 2; t++) begin
        if (t >= 2) begin
          int x, y;
          x = (t - 2) % 800; y = (t - 2) / 800;
          chk({g, r, b} == expected(x, y, m[0]), "colour", x, y);
          chk(vga_hs_n == !(x >= 592 && x < 688) && vga_vs_n == !(y >= 450 && y < 452), "sync", x, y);
        end
        if (fetch && t < 800 * 525) nf++;
        @(negedge clk);
      end
      chk(nf == (m ? 25600 : 12800), $sformatf("fetch count %0d", nf), 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
