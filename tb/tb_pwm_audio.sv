// tb_pwm_audio: an 800-clock line counter with HSYNC low at HC 592..687
// drives the PWM. For each of several levels (changed in the 208 clocks after
// the HSYNC edge) the high time of the next lines must be 208 + 2*level
// clocks, i.e. 26% to 90% duty at one period per line.
module tb_pwm_audio;
  logic clk = 0, rst, hsync_n, pwm;
  logic [9:0] hc;
  logic [7:0] level;
  int checks = 0, failures = 0;

  pwm_audio dut (.clk, .rst, .hc, .hsync_n, .level, .pwm);

  always #5 clk = ~clk;
  always_ff @(posedge clk) hc <= rst ? 10'd0 : (hc == 10'd799) ? 10'd0 : hc + 10'd1;
  assign hsync_n = !(hc >= 10'd592 && hc < 10'd688);

  initial begin
    rst = 1; level = 8'd0;
    repeat (3) @(negedge clk); rst = 0;
    for (int n = 0; n < 40; n++) begin
      int high, lowc;
      logic [7:0] lv;
      lv = (n == 0) ? 8'd0 : (n == 1) ? 8'd255 : 8'($urandom);
      // wait for the sync edge, then change the level
      while (!(hc == 10'd600)) @(negedge clk);
      level = lv;
      // measure one full period starting at the next sync edge
      while (!(hc == 10'd592)) @(negedge clk);
      high = 0; lowc = 0;
      for (int i = 0; i < 800; i++) begin
        @(negedge clk);
        if (pwm) high++; else lowc++;
      end
      checks++;
      if (high != 208 + 2 * int'(lv)) begin
        failures++;
        if (failures < 10) $display("level %0d: high %0d exp %0d", lv, high, 208 + 2 * int'(lv));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
