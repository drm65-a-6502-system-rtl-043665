// io_regs: peripheral block of DRM65, the 16 registers at $E000-$E00F.
//  off  write                         read
//   0   UTXD  send a byte             URXD  last received byte
//   1   BORDER[3:0] border entry      USTAT THRE DV FTXI FRXI - TEND OV FE
//   2   CTRL1 CHSI CVSI CDLI SDLI     STAT1 FHSI FVSI HSYN VSYN
//              EHSI EVSI ETXI ERXI          EHSI EVSI ETXI ERXI
//   3   CTRL2 EKBI VMOD (bits 1:0)    STAT2 FKBI KBDV 0000 EKBI VMOD
//   4   PINOUT                        PINOUT
//   5   PAL0  {green, red} to temp    PININ
//   6   PAL1  {index, blue}: writes {temp, blue} to palette[index]
//   7   PWM   audio level             KBD   scan code (read sets it to $FF)
//   8-14 PAGE0..PAGE6 (4 bits)        PAGE0..PAGE6
// CTRL1 bits 7:4 are write strobes and are not stored. Register writes and
// read side effects (URXD clears DV/OV, KBD clears the scan code) happen at
// the clock edge ending a CPU cycle that has ce high; rdata is combinational
// and is captured by the CPU data register.
// Contains the UART, the PS2 receiver, the PWM generator and the interrupt
// logic. Reset values (identity page map, /SS lines high, everything else
// zero) are this design's choice.
module io_regs
  import drm65_pkg::*;
#(
  parameter int DIVISOR = 217
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ce,
  input  logic            sel,
  input  logic            we,
  input  logic [3:0]      addr,
  input  logic [7:0]      wdata,
  output logic [7:0]      rdata,
  // to the MMU
  output logic [6:0][3:0] page,
  // to/from the video generator
  output logic            vmod,
  output logic [3:0]      border,
  output logic            pal_we,
  output logic [3:0]      pal_waddr,
  output logic [11:0]     pal_wdata,
  input  logic [9:0]      hc,
  input  logic            hsync_n,
  input  logic            vsync_n,
  // pins
  output logic            txd,
  input  logic            rxd,
  input  logic            ps2_clk,
  input  logic            ps2_data,
  output logic            pwm_out,
  output logic [7:0]      pinout,
  input  logic [7:0]      pinin,
  output logic            irq
);
  logic       wr, rd;
  logic [3:0] ien;            // EHSI EVSI ETXI ERXI
  logic       ekbi;
  logic [7:0] pal0;
  logic [7:0] pwm_level;
  logic [7:0] rx_data, scancode;
  logic       thre, tend, udv, ov, fe, kbdv;
  logic       frxi, ftxi, fvsi, fhsi, fkbi;
  logic       ctrl1_wr;

  assign wr       = ce && sel && we;
  assign rd       = ce && sel && !we;
  assign ctrl1_wr = wr && (addr == R_CTRL1);

  always_ff @(posedge clk) begin
    if (rst) begin
      ien       <= '0;
      ekbi      <= 1'b0;
      vmod      <= 1'b0;
      border    <= '0;
      pinout    <= 8'h30;
      pal0      <= '0;
      pwm_level <= '0;
      for (int i = 0; i < 7; i++) page[i] <= 4'(i);
    end else if (wr) begin
      unique case (addr)
        R_BORDER: border    <= wdata[3:0];
        R_CTRL1:  ien       <= wdata[3:0];
        R_CTRL2:  {ekbi, vmod} <= wdata[1:0];
        R_PINOUT: pinout    <= wdata;
        R_PAL0:   pal0      <= wdata;
        R_PWM:    pwm_level <= wdata;
        4'h8, 4'h9, 4'hA, 4'hB, 4'hC, 4'hD, 4'hE:
                  page[addr[2:0]] <= wdata[3:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    pal_we    = wr && (addr == R_PAL1);
    pal_waddr = wdata[7:4];
    pal_wdata = {pal0, wdata[3:0]};
  end

  always_comb begin
    unique case (addr)
      R_UART:   rdata = rx_data;
      R_BORDER: rdata = {thre, udv, ftxi, frxi, 1'b0, tend, ov, fe};
      R_CTRL1:  rdata = {fhsi, fvsi, hsync_n, vsync_n, ien};
      R_CTRL2:  rdata = {fkbi, kbdv, 4'b0000, ekbi, vmod};
      R_PINOUT: rdata = pinout;
      R_PAL0:   rdata = pinin;
      R_PWM:    rdata = scancode;
      4'h8, 4'h9, 4'hA, 4'hB, 4'hC, 4'hD, 4'hE:
                rdata = {4'h0, page[addr[2:0]]};
      default:  rdata = 8'h00;
    endcase
  end

  uart #(.DIVISOR(DIVISOR)) u_uart (
    .clk, .rst,
    .wr_tx(wr && addr == R_UART), .tx_data(wdata),
    .rd_rx(rd && addr == R_UART), .rx_data,
    .thre, .tend, .dv(udv), .ov, .fe, .txd, .rxd
  );

  ps2_kbd u_kbd (
    .clk, .rst, .hc4(hc[4]), .ps2_clk, .ps2_data,
    .rd(rd && addr == R_PWM), .scancode, .kbdv
  );

  pwm_audio u_pwm (
    .clk, .rst, .hc, .hsync_n, .level(pwm_level), .pwm(pwm_out)
  );

  irq_ctrl #(.DELAY(23)) u_irq (
    .clk, .rst, .ce,
    .erxi(ien[0]), .etxi(ien[1]), .evsi(ien[2]), .ehsi(ien[3]), .ekbi,
    .dv(udv), .thre, .kbdv, .hsync_n, .vsync_n,
    .sdli(ctrl1_wr && wdata[4]), .cdli(ctrl1_wr && wdata[5]),
    .cvsi(ctrl1_wr && wdata[6]), .chsi(ctrl1_wr && wdata[7]),
    .frxi, .ftxi, .fvsi, .fhsi, .fkbi, .irq
  );
endmodule
