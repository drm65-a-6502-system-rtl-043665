// drm65_top: system logic of the DRM65 6502 computer.
// A 6502 core (outside this RTL; its bus is the cpu_* ports) runs at the
// 25 MHz system clock with a clock enable. The CPU address is decoded into
// the I/O window $E000-$E00F, the 8 KB boot RAM ($E010-$FFFF) or the
// external 64Kx16 SRAM ($0000-$DFFF). For the SRAM the MMU swaps address
// bits 15:13 for a 4-bit page register, giving a 17-bit byte address.
// The video generator shares the SRAM: on each of its fetch cycles (one in
// 16 clocks in 1 bpp mode, one in 8 in 4 bpp mode, only in the displayed
// window) it takes the bus, and if the CPU wanted the SRAM in that cycle
// cpu_ce goes low and the CPU repeats the cycle. A core with synchronous
// memory timing expects read data one cycle after the address: the boot RAM
// is synchronous, and SRAM/I/O data pass a register with a delayed mux
// select (cpu_data_mux). cpu_din is valid in the cycle after the read cycle.
// Timing: every CPU-side register advances on clock edges with cpu_ce high.
module drm65_top #(
  parameter int DIVISOR = 217
) (
  input  logic        clk,
  input  logic        rst,
  // 6502 core bus
  input  logic [15:0] cpu_addr,
  input  logic [7:0]  cpu_dout,
  input  logic        cpu_we,
  output logic [7:0]  cpu_din,
  output logic        cpu_ce,
  output logic        cpu_irq,
  // external SRAM
  output logic [15:0] sram_addr,
  output logic [15:0] sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [15:0] sram_dq_i,
  output logic        sram_we_n,
  output logic        sram_oe_n,
  output logic        sram_bhe_n,
  output logic        sram_ble_n,
  // VGA
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs_n,
  output logic        vga_vs_n,
  // peripherals
  output logic        uart_txd,
  input  logic        uart_rxd,
  input  logic        ps2_clk,
  input  logic        ps2_data,
  output logic        pwm_out,
  output logic [7:0]  pinout,
  input  logic [7:0]  pinin
);
  logic            io_sel, ram_sel, ext_sel;
  logic [16:0]     phys;
  logic [6:0][3:0] page;
  logic [7:0]      ram_q, io_q, ext_byte;
  logic            stall;
  logic            vfetch;
  logic [15:0]     vaddr, vdata;
  logic            vmod, pal_we;
  logic [3:0]      border, pal_waddr;
  logic [11:0]     pal_wdata;
  logic [9:0]      hc;
  logic            hsync_n, vsync_n;

  assign cpu_ce = !stall;

  addr_decoder u_dec (.addr(cpu_addr), .io_sel, .ram_sel, .ext_sel);

  mmu #(.NPAGES(7), .PBITS(4)) u_mmu (.cpu_addr, .page, .phys_addr(phys));

  boot_ram #(.AW(13)) u_boot (
    .clk, .ce(cpu_ce), .sel(ram_sel), .we(cpu_we),
    .addr(cpu_addr[12:0]), .wdata(cpu_dout), .rdata(ram_q)
  );

  ext_mem_if u_xmem (
    .clk, .video_fetch(vfetch), .video_addr(vaddr), .cpu_phys(phys),
    .cpu_ext_sel(ext_sel), .cpu_we, .cpu_dout, .cpu_stall(stall),
    .cpu_rbyte(ext_byte), .video_rdata(vdata),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_we_n, .sram_oe_n, .sram_bhe_n, .sram_ble_n
  );

  cpu_data_mux u_dmux (
    .clk, .rst, .ce(cpu_ce), .ram_sel, .io_sel,
    .ext_data(ext_byte), .io_data(io_q), .ram_data(ram_q), .cpu_din
  );

  io_regs #(.DIVISOR(DIVISOR)) u_io (
    .clk, .rst, .ce(cpu_ce), .sel(io_sel), .we(cpu_we),
    .addr(cpu_addr[3:0]), .wdata(cpu_dout), .rdata(io_q),
    .page, .vmod, .border, .pal_we, .pal_waddr, .pal_wdata,
    .hc, .hsync_n, .vsync_n,
    .txd(uart_txd), .rxd(uart_rxd), .ps2_clk, .ps2_data,
    .pwm_out, .pinout, .pinin, .irq(cpu_irq)
  );

  video_gen u_video (
    .clk, .rst, .vmod, .border, .pal_we, .pal_waddr, .pal_wdata,
    .fetch(vfetch), .vaddr, .vdata, .hc, .hsync_n, .vsync_n,
    .r(vga_r), .g(vga_g), .b(vga_b), .vga_hs_n, .vga_vs_n
  );
endmodule
