// tb_io_regs: exercises the register map through CPU-style bus cycles
// (DIVISOR reduced to 8, UART looped back): page registers (identity after
// reset, write and read back), BORDER, CTRL2/STAT2, CTRL1/STAT1 enables and
// live sync bits, PINOUT/PININ, the PAL0-then-PAL1 palette write, a UART
// byte with USTAT flags and the RX interrupt, a PS2 scan code read through
// KBD (then $FF), the keyboard interrupt and PWM register effect.
module tb_io_regs;
  logic clk = 0, rst, ce, sel, we;
  logic [3:0] addr;
  logic [7:0] wdata, rdata;
  logic [6:0][3:0] page;
  logic vmod, pal_we;
  logic [3:0] border, pal_waddr;
  logic [11:0] pal_wdata;
  logic [9:0] hc;
  logic hsync_n, vsync_n, txd, rxd, ps2_clk, ps2_data, pwm_out, irq;
  logic [7:0] pinout, pinin;
  logic [11:0] last_pal [16];
  logic [15:0] pal_written;
  int checks = 0, failures = 0;

  io_regs #(.DIVISOR(8)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) hc <= rst ? 10'd0 : (hc == 10'd799) ? 10'd0 : hc + 10'd1;
  assign hsync_n = !(hc >= 10'd592 && hc < 10'd688);
  assign rxd = txd;

  always_ff @(posedge clk) if (pal_we) begin
    last_pal[pal_waddr] <= pal_wdata;
    pal_written[pal_waddr] <= 1'b1;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s (rdata=%h)", what, rdata);
    end
  endtask

  task automatic wr(input logic [3:0] a, input logic [7:0] d);
    sel = 1; we = 1; addr = a; wdata = d; @(negedge clk); sel = 0; we = 0;
  endtask

  task automatic rd(input logic [3:0] a, output logic [7:0] d);
    sel = 1; we = 0; addr = a; #1 d = rdata; @(negedge clk); sel = 0;
  endtask

  task automatic ps2_send(input logic [7:0] code);
    logic [10:0] frame;
    frame = {1'b1, ~^code, code, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = frame[i];
      repeat (400) @(negedge clk);
      ps2_clk = 0;
      repeat (800) @(negedge clk);
      ps2_clk = 1;
      repeat (400) @(negedge clk);
    end
    ps2_data = 1;
  endtask

  initial begin
    logic [7:0] d;
    rst = 1; ce = 1; sel = 0; we = 0; addr = 0; wdata = 0; vsync_n = 1;
    ps2_clk = 1; ps2_data = 1; pinin = 8'h00; pal_written = '0;
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    // page registers
    for (int i = 0; i < 7; i++) begin
      rd(4'(8 + i), d); chk(d == 8'(i) && page[i] == 4'(i), "page reset");
    end
    for (int i = 0; i < 7; i++) wr(4'(8 + i), 8'hF0 | 8'(15 - i));
    for (int i = 0; i < 7; i++) begin
      rd(4'(8 + i), d); chk(d == 8'(15 - i) && page[i] == 4'(15 - i), "page write");
    end
    rd(4'hF, d); chk(d == 8'h00, "unused reads 0");
    // border / video mode / keyboard enable
    wr(4'h1, 8'hA7); chk(border == 4'h7, "border");
    wr(4'h3, 8'h03); rd(4'h3, d); chk(vmod && d[1:0] == 2'b11, "ctrl2");
    wr(4'h3, 8'h00); rd(4'h3, d); chk(!vmod && d == 8'h00, "ctrl2 clear");
    // CTRL1 enables and STAT1 live sync bits
    wr(4'h2, 8'h0C); rd(4'h2, d); chk(d[3:0] == 4'hC, "ctrl1 enables");
    while (hsync_n) @(negedge clk);
    @(negedge clk);
    rd(4'h2, d); chk(d[5] == 1'b0 && d[7], "stat1 hsync low and FHSI");
    wr(4'h2, 8'h80); rd(4'h2, d); chk(!d[7], "CHSI");
    wr(4'h2, 8'h00);
    // pins
    rd(4'h4, d); chk(d == 8'h30, "pinout reset");
    wr(4'h4, 8'h9A); rd(4'h4, d); chk(d == 8'h9A && pinout == 8'h9A, "pinout");
    pinin = 8'hC5; rd(4'h5, d); chk(d == 8'hC5, "pinin");
    // palette
    for (int i = 0; i < 16; i++) begin
      wr(4'h5, 8'(i * 17 + 3));
      wr(4'h6, {4'(i), 4'(15 - i)});
    end
    @(negedge clk);
    for (int i = 0; i < 16; i++)
      chk(pal_written[i] && last_pal[i] == {8'(i * 17 + 3), 4'(15 - i)}, "palette entry");
    // UART loopback with RX interrupt
    rd(4'h1, d); chk(d[7] && d[2] && !d[6], "ustat idle");
    wr(4'h2, 8'h01);
    wr(4'h0, 8'h96);
    repeat (200) @(negedge clk);
    rd(4'h1, d); chk(d[6] && d[4] && !d[0] && !d[1], "ustat dv frxi");
    chk(irq, "rx irq");
    rd(4'h0, d); chk(d == 8'h96, "urxd");
    rd(4'h1, d); chk(!d[6], "dv cleared");
    chk(!irq, "rx irq cleared");
    wr(4'h2, 8'h02); rd(4'h1, d); chk(d[5] && irq, "ftxi");
    wr(4'h2, 8'h00);
    // keyboard
    wr(4'h3, 8'h02);
    ps2_send(8'h2B);
    rd(4'h3, d); chk(d[7] && d[6], "stat2 kbdv fkbi");
    chk(irq, "kbd irq");
    rd(4'h7, d); chk(d == 8'h2B, "kbd code");
    rd(4'h7, d); chk(d == 8'hFF, "kbd after read");
    rd(4'h3, d); chk(!d[7] && !d[6], "kbd flags cleared");
    // PWM register
    wr(4'h7, 8'd100);
    while (hsync_n) @(negedge clk);
    while (hc != 10'd150) @(negedge clk);
    chk(pwm_out, "pwm high before match");
    while (hc != 10'd210) @(negedge clk);
    chk(!pwm_out, "pwm low after match");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
