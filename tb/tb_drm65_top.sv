// tb_drm65_top: end-to-end test of the DRM65 system logic at its default
// parameters (UART DIVISOR 217). A bus-functional model of the 6502 bus
// issues one access per CPU clock (honouring cpu_ce); an SRAM model sits on
// the memory pins; the UART is looped back; a keyboard model sends a frame.
// A raster checker compares every VGA colour and sync against a model built
// from the SRAM contents, the palette and the border written by the test.
// Steps: boot RAM, SRAM byte lanes, MMU remapping, palette and border setup,
// a 1 bpp frame and a 4 bpp frame with the CPU on the SRAM all the time
// (stalls must equal the video fetches: 12800 and 25600 per frame,
// the CPU must still read correct data), a stretch
// with the CPU in the boot RAM (fetches with no stall), VSYNC, HSYNC,
// delayed (23 CPU cycles), UART and keyboard interrupts, PWM and pins.
// Each mechanism is counted and one that never happened is a failure.
module tb_drm65_top;
  logic        clk = 0, rst;
  logic [15:0] cpu_addr;
  logic [7:0]  cpu_dout, cpu_din;
  logic        cpu_we, cpu_ce, cpu_irq;
  logic [15:0] sram_addr, sram_dq_o, sram_dq_i;
  logic        sram_dq_oe, sram_we_n, sram_oe_n, sram_bhe_n, sram_ble_n;
  logic [3:0]  vga_r, vga_g, vga_b;
  logic        vga_hs_n, vga_vs_n, uart_txd, uart_rxd, ps2_clk, ps2_data, pwm_out;
  logic [7:0]  pinout, pinin;

  drm65_top dut (.*);

  sram_64kx16 u_sram (
    .addr(sram_addr), .dq_w(sram_dq_o), .dq_r(sram_dq_i),
    .we_n(sram_we_n), .oe_n(sram_oe_n), .bhe_n(sram_bhe_n), .ble_n(sram_ble_n)
  );

  assign uart_rxd = uart_txd;

  always #20 clk = ~clk;   // 25 MHz

  int checks = 0, failures = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- raster reference ----------------
  int x, y, x1, y1, x2, y2;
  always_ff @(posedge clk) begin
    if (rst) begin
      x <= 0; y <= 0;
    end else begin
      x <= (x == 799) ? 0 : x + 1;
      if (x == 799) y <= (y == 524) ? 0 : y + 1;
    end
    x1 <= x; y1 <= y; x2 <= x1; y2 <= y1;
  end

  logic [11:0] pal [16];
  logic [3:0]  border_ref;
  logic        vmod_ref;
  logic        vid_on = 0;
  int n_mono_pix = 0, n_color_pix = 0, n_border = 0, n_black = 0;
  int n_stall = 0, n_par_fetch = 0, n_fetch = 0;

  function automatic logic [11:0] expected(input int px, input int py);
    logic [15:0] w, ord;
    logic [3:0] idx;
    if ((px >= 576 && px < 736) || (py >= 440 && py < 485)) return 12'h000;
    if (!(px < 512 && py < 400)) return pal[border_ref];
    if (!vmod_ref) begin
      w = u_sram.mem[py * 32 + px / 16];
      ord = {w[7:0], w[15:8]};
      idx = {4{ord[15 - px % 16]}};
    end else begin
      w = u_sram.mem[(py / 2) * 64 + px / 8];
      ord = {w[7:0], w[15:8]};
      idx = ord[15 - 4 * ((px % 8) / 2) -: 4];
    end
    return pal[idx];
  endfunction

  always @(negedge clk) if (!rst) begin
    if (!sram_bhe_n && !sram_ble_n) begin
      n_fetch++;
      if (cpu_ce) n_par_fetch++;
    end
    if (!cpu_ce) n_stall++;
    if (vid_on) begin
      logic [11:0] e;
      e = expected(x2, y2);
      chk({vga_g, vga_r, vga_b} == e, $sformatf("colour x=%0d y=%0d", x2, y2));
      chk(vga_hs_n == !(x2 >= 592 && x2 < 688) && vga_vs_n == !(y2 >= 450 && y2 < 452), "sync");
      if (x2 < 512 && y2 < 400) begin
        if (vmod_ref) n_color_pix++; else n_mono_pix++;
      end else if (e == 12'h000) n_black++;
      else n_border++;
    end
  end

  // ---------------- 6502 bus model ----------------
  // Called just after a clock edge; returns just after the edge that ends the
  // access (the first edge with cpu_ce high). cpu_din is then the read data.
  int n_ops;
  task automatic bus(input logic [15:0] a, input logic w, input logic [7:0] d);
    logic ok;
    cpu_addr = a; cpu_we = w; cpu_dout = d;
    do begin
      @(negedge clk); ok = cpu_ce;
      @(posedge clk);
    end while (!ok);
    #1;
    n_ops++;
    // between accesses of the test the bus rests on a boot RAM read,
    // which has no side effect
    cpu_addr = 16'hF000; cpu_we = 1'b0;
  endtask

  task automatic wr(input logic [15:0] a, input logic [7:0] d);
    bus(a, 1'b1, d);
  endtask

  task automatic rd(input logic [15:0] a, output logic [7:0] d);
    bus(a, 1'b0, 8'h00);
    d = cpu_din;
  endtask

  task automatic wait_xy(input int wx, input int wy);
    while (!(x == wx && y == wy)) begin @(posedge clk); #1; end
  endtask

  // ---------------- keyboard model ----------------
  task automatic ps2_send(input logic [7:0] code);
    logic [10:0] frame;
    frame = {1'b1, ~^code, code, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = frame[i];
      repeat (450) @(negedge clk);
      ps2_clk = 0;
      repeat (900) @(negedge clk);
      ps2_clk = 1;
      repeat (450) @(negedge clk);
    end
    ps2_data = 1;
  endtask

  int n_boot = 0, n_lanes = 0, n_mmu = 0, n_mono_frame = 0, n_color_frame = 0;
  int n_vsi = 0, n_hsi = 0, n_dli = 0, n_rxi = 0, n_txi = 0, n_kbi = 0, n_pwm = 0;

  initial begin
    logic [7:0] d;
    int s0, f0, c0, ops;
    rst = 1; cpu_addr = 16'hFFFC; cpu_we = 0; cpu_dout = 0;
    ps2_clk = 1; ps2_data = 1; pinin = 8'h5A;
    repeat (4) @(posedge clk); #1 rst = 0;

    // boot RAM: write and read back, incl. the reset vector
    wr(16'hFFFC, 8'h00); wr(16'hFFFD, 8'hE1); wr(16'hE010, 8'h42);
    rd(16'hFFFC, d); chk(d == 8'h00, "boot FFFC");
    rd(16'hFFFD, d); chk(d == 8'hE1, "boot FFFD");
    rd(16'hE010, d); chk(d == 8'h42, "boot E010"); n_boot += int'(d == 8'h42);

    // SRAM byte lanes: even byte in bits 7:0, odd byte in 15:8
    wr(16'h0100, 8'hAA); wr(16'h0101, 8'h55);
    chk(u_sram.mem[16'h0080] == 16'h55AA, "lanes in SRAM");
    rd(16'h0101, d); chk(d == 8'h55, "odd read");
    rd(16'h0100, d); chk(d == 8'hAA, "even read");
    n_lanes += int'(u_sram.mem[16'h0080] == 16'h55AA);

    // MMU: map CPU page 6 ($C000) to physical block 2, and block 15
    rd(16'hE00E, d); chk(d == 8'h06, "PAGE6 reset");
    wr(16'hE00E, 8'h02);
    wr(16'hC010, 8'h77);
    chk(u_sram.mem[16'h2008][7:0] == 8'h77, "mmu write phys");
    rd(16'h4010, d); chk(d == 8'h77, "mmu alias read");
    wr(16'hE00E, 8'h0F);
    wr(16'hC001, 8'h99);
    chk(u_sram.mem[16'hF000][15:8] == 8'h99, "mmu top block");
    rd(16'hC001, d); chk(d == 8'h99, "mmu readback");
    n_mmu += int'(d == 8'h99);
    wr(16'hE00E, 8'h06);

    // pins
    wr(16'hE004, 8'hC3); chk(pinout == 8'hC3, "pinout");
    rd(16'hE005, d); chk(d == 8'h5A, "pinin");

    // palette (PAL0 then PAL1) and border
    for (int i = 0; i < 16; i++) begin
      logic [11:0] c;
      c = 12'($urandom) | 12'h010;
      wr(16'hE005, c[11:4]);
      wr(16'hE006, {4'(i), c[3:0]});
      pal[i] = c;
    end
    wr(16'hE001, 8'h09); border_ref = 4'h9;
    wr(16'hE003, 8'h00); vmod_ref = 1'b0;
    // video memory: 25 KB pattern
    for (int a = 0; a < 'h3200; a++) u_sram.mem[a] = 16'((a * 40503) ^ (a >> 5) ^ 16'hC35A);

    // ---- one 1 bpp frame, CPU on the SRAM every cycle ----
    wait_xy(0, 0);
    vid_on = 1;
    s0 = n_stall; f0 = n_fetch;
    while (y < 400) rd(16'h2000 + 16'($urandom_range(0, 255)), d);
    // finish the frame precisely
    wait_xy(0, 0);
    chk(n_stall - s0 == 12800, $sformatf("mono stalls %0d", n_stall - s0));
    chk(n_fetch - f0 == 12800, $sformatf("mono fetches %0d", n_fetch - f0));
    n_mono_frame++;

    // ---- switch to 4 bpp in vertical blanking ----
    wait_xy(0, 445);
    wr(16'hE003, 8'h01); vmod_ref = 1'b1;
    wait_xy(0, 0);
    s0 = n_stall; f0 = n_fetch; ops = 0;
    while (y < 400) begin
      logic [15:0] a;
      a = 16'h2000 + 16'($urandom_range(0, 511));
      rd(a, d);
      chk(d == (a[0] ? u_sram.mem[a[15:1]][15:8] : u_sram.mem[a[15:1]][7:0]), "read under stall");
    end
    wait_xy(0, 0);
    chk(n_stall - s0 == 25600, $sformatf("color stalls %0d", n_stall - s0));
    chk(n_fetch - f0 == 25600, $sformatf("color fetches %0d", n_fetch - f0));
    n_color_frame++;

    // ---- CPU in the boot RAM while video fetches: no stall ----
    s0 = n_stall; c0 = n_par_fetch;
    repeat (2000) rd(16'hF000 + 16'($urandom_range(0, 255)), d);
    chk(n_stall == s0, "no stall from internal RAM");
    chk(n_par_fetch > c0, "parallel fetches");

    // ---- VSYNC interrupt ----
    wr(16'hE002, 8'h04);
    while (!cpu_irq) begin @(posedge clk); #1; end
    chk(y == 450 && x <= 2, $sformatf("vsync irq at %0d,%0d", x, y));
    rd(16'hE002, d); chk(d[6] && d[2], "FVSI");
    wr(16'hE002, 8'h40);
    chk(!cpu_irq, "CVSI clears"); n_vsi += int'(d[6]);
    wr(16'hE002, 8'h00);

    // ---- HSYNC interrupt ----
    wr(16'hE002, 8'h08);
    while (!cpu_irq) begin @(posedge clk); #1; end
    chk(x >= 592 && x <= 595, $sformatf("hsync irq at x=%0d", x));
    rd(16'hE002, d); chk(d[7] && d[3], "FHSI");
    wr(16'hE002, 8'h80); n_hsi += int'(d[7]);
    wr(16'hE002, 8'h00);
    chk(!cpu_irq, "CHSI clears");

    // ---- delayed interrupt: 23 CPU cycles after the SDLI write ----
    wait_xy(100, 10);
    wr(16'hE002, 8'h10);
    ops = 0;
    while (!cpu_irq && ops < 60) begin
      rd(16'h3000, d);
      ops++;
    end
    chk(ops == 23, $sformatf("delayed irq after %0d cycles", ops));
    n_dli += int'(ops == 23);
    wr(16'hE002, 8'h20);
    chk(!cpu_irq, "CDLI clears");

    // ---- UART loopback, RX and TX interrupts ----
    rd(16'hE001, d); chk(d[7] && d[2], "THRE TEND idle");
    wr(16'hE002, 8'h01);
    wr(16'hE000, 8'h4D);
    begin
      int bt;
      bt = 0;
      while (uart_txd) begin @(posedge clk); #1; end
      while (!uart_txd) begin @(posedge clk); #1; bt++; end
      chk(bt == 217, $sformatf("start bit %0d clocks", bt));
    end
    wr(16'hE000, 8'hB2);
    rd(16'hE001, d); chk(!d[7] && !d[2], "THRE low while queued");
    wr(16'hE000, 8'hEE);   // dropped: holding register full
    while (!cpu_irq) begin @(posedge clk); #1; end
    rd(16'hE001, d); chk(d[6] && d[4], "DV FRXI");
    rd(16'hE000, d); chk(d == 8'h4D, "URXD first"); n_rxi++;
    while (!cpu_irq) begin @(posedge clk); #1; end
    rd(16'hE000, d); chk(d == 8'hB2, $sformatf("URXD second %h", d));
    chk(!cpu_irq, "RX irq cleared");
    repeat (3000) begin @(posedge clk); #1; end
    rd(16'hE001, d); chk(!d[6] && d[2], "third byte was dropped");
    wr(16'hE002, 8'h02);
    rd(16'hE001, d); chk(d[5] && cpu_irq, "FTXI"); n_txi += int'(d[5]);
    wr(16'hE002, 8'h00);

    // ---- keyboard ----
    wr(16'hE003, 8'h03);
    ps2_send(8'h1C);
    @(posedge clk); #1;
    chk(cpu_irq, "keyboard irq");
    rd(16'hE003, d); chk(d[7] && d[6], "FKBI KBDV");
    rd(16'hE007, d); chk(d == 8'h1C, "scan code"); n_kbi += int'(d == 8'h1C);
    rd(16'hE007, d); chk(d == 8'hFF, "KBD reads FF after read");
    chk(!cpu_irq, "keyboard irq cleared");

    // ---- PWM audio: high for 208 + 2*level clocks per line ----
    wait_xy(600, 20);
    wr(16'hE007, 8'd64);
    wait_xy(592, 21);
    begin
      int hi;
      hi = 0;
      repeat (800) begin @(posedge clk); #1; hi += int'(pwm_out); end
      chk(hi == 208 + 128, $sformatf("pwm high %0d", hi));
      n_pwm += int'(hi == 336);
    end

    vid_on = 0;
    chk(n_boot > 0, "boot RAM used");
    chk(n_lanes > 0, "byte lanes");
    chk(n_mmu > 0, "MMU remap");
    chk(n_mono_frame > 0 && n_mono_pix > 0, "1 bpp frame");
    chk(n_color_frame > 0 && n_color_pix > 0, "4 bpp frame");
    chk(n_stall > 0, "cycle stealing");
    chk(n_par_fetch > 0, "fetch without stall");
    chk(n_border > 0 && n_black > 0, "border and blanking");
    chk(n_vsi > 0 && n_hsi > 0 && n_dli > 0, "sync and delayed irqs");
    chk(n_rxi > 0 && n_txi > 0 && n_kbi > 0, "uart and keyboard irqs");
    chk(n_pwm > 0, "pwm");
    $display("mechanisms: stalls=%0d parallel_fetches=%0d mono_pixels=%0d color_pixels=%0d border=%0d black=%0d",
             n_stall, n_par_fetch, n_mono_pix, n_color_pix, n_border, n_black);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
