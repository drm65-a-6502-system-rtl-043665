// tb_video_shifter: loads random words every 16 (1 bpp) or 8 (4 bpp) clocks
// and checks the pixel sequence: 1 bpp gives low byte MSB first then high
// byte, as index 0 or 15; 4 bpp gives the nibbles low-byte high nibble first,
// each held for two clocks. The first pixel appears the clock after load.
module tb_video_shifter;
  logic clk = 0, load, vmod, odd;
  logic [15:0] data;
  logic [3:0] pixel;
  logic [9:0] hc;
  int checks = 0, failures = 0;

  video_shifter dut (.clk, .load, .vmod, .odd, .data, .pixel);

  always #5 clk = ~clk;

  initial begin
    for (int m = 0; m < 2; m++) begin
      vmod = m[0];
      for (int w = 0; w < 200; w++) begin
        logic [15:0] word;
        int period;
        period = m ? 8 : 16;
        word = 16'($urandom);
        for (int k = 0; k < period; k++) begin
          @(negedge clk);
          hc = 10'(k); odd = hc[0];
          load = (k == 0); data = load ? word : 16'($urandom);
          @(posedge clk); #1;
          // after the edge ending cycle k the pixel of cycle k is shown
          begin
            logic [3:0] exp;
            if (m == 0) exp = {4{word[k < 8 ? 7 - k : 15 - (k - 8)]}};
            else begin
              int p;
              logic [15:0] ord;
              p = k / 2;
              ord = {word[7:0], word[15:8]};
              exp = ord[15 - 4 * p -: 4];
            end
            checks++;
            if (pixel !== exp) begin
              failures++;
              if (failures < 10) $display("m=%0d w=%0d k=%0d got %h exp %h", m, w, k, pixel, exp);
            end
          end
        end
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
