// tb_video_palette: fills the 16 entries with random colours, then drives
// random pixel/dv/blk/border and checks one clock later: black when blk was
// set, the border entry when dv was low, the pixel entry otherwise.
module tb_video_palette;
  logic clk = 0, dv, blk, we;
  logic [3:0] pixel, border, waddr, r, g, b;
  logic [11:0] wdata;
  logic [11:0] ref_pal [16];
  int checks = 0, failures = 0;

  video_palette dut (.clk, .pixel, .dv, .blk, .border, .we, .waddr, .wdata, .r, .g, .b);

  always #5 clk = ~clk;

  initial begin
    dv = 0; blk = 0; pixel = 0; border = 0; we = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; waddr = 4'(i); wdata = 12'($urandom); ref_pal[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [11:0] exp;
      @(negedge clk);
      pixel = 4'($urandom); border = 4'($urandom);
      dv = 1'($urandom); blk = ($urandom_range(0, 3) == 0);
      exp = blk ? 12'h000 : ref_pal[dv ? pixel : border];
      // occasional write to an entry not read this cycle
      we = ($urandom_range(0, 9) == 0);
      waddr = 4'($urandom); wdata = 12'($urandom);
      if (we && waddr == (dv ? pixel : border)) we = 0;
      @(posedge clk);
      if (we) ref_pal[waddr] = wdata;
      #1;
      checks++;
      if ({g, r, b} !== exp) begin
        failures++;
        if (failures < 10) $display("n=%0d got %h exp %h", n, {g, r, b}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
