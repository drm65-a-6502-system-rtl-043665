// tb_video_timing: runs two full frames and checks every output against an
// independent model of the 800x525 raster: counter values, the 512x400 data
// valid window, blanking, sync positions and the counts per frame
// (hsync pulses per frame = 525, 96 clocks each; vsync 2 lines).
module tb_video_timing;
  logic clk = 0, rst;
  logic [9:0] hc, vc;
  logic dv, blk, hsync_n, vsync_n;
  int checks = 0, failures = 0;
  int x, y, dv_cnt, hs_low, vs_low_lines;

  video_timing dut (.clk, .rst, .hc, .vc, .dv, .blk, .hsync_n, .vsync_n);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s x=%0d y=%0d hc=%0d vc=%0d", what, x, y, hc, vc);
    end
  endtask

  initial begin
    rst = 1; @(negedge clk); rst = 0;
    for (int f = 0; f < 2; f++) begin
      dv_cnt = 0; hs_low = 0; vs_low_lines = 0;
      for (y = 0; y < 525; y++)
        for (x = 0; x < 800; x++) begin
          chk(hc == 10'(x) && vc == 10'(y), "counter");
          chk(dv == (x < 512 && y < 400), "dv");
          chk(blk == ((x >= 576 && x < 736) || (y >= 440 && y < 485)), "blk");
          chk(hsync_n == !(x >= 592 && x < 688), "hsync");
          chk(vsync_n == !(y >= 450 && y < 452), "vsync");
          dv_cnt += int'(dv);
          hs_low += int'(!hsync_n);
          if (x == 0 && !vsync_n) vs_low_lines++;
          @(negedge clk);
        end
      chk(dv_cnt == 512 * 400, "dv count");
      chk(hs_low == 96 * 525, "hsync count");
      chk(vs_low_lines == 2, "vsync lines");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
