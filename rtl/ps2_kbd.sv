// ps2_kbd: receiver for PS2 keyboard scan codes.
// A PS2 frame is 11 bits sent LSB first: start (0), 8 data bits, odd parity,
// stop (1); data are valid on the falling edges of the keyboard clock
// (10-16 kHz). The receiver is an 11-bit shift register that starts all ones
// and shifts the data line in at each detected falling clock edge. When the
// start bit reaches the eleventh stage (sr[10]=0) a scan code is ready:
// kbdv goes high and the register stops shifting. A read (rd) sets all bits
// back to one, so the code reads as $FF afterwards.
// The keyboard clock is not edge-detected directly: a "deglitcher" flip-flop
// samples it only at rising edges of hc4 (HC[4] of the video counter, every
// 32 clocks = 1.28 us at 25 MHz), which filters ringing on the slow,
// asynchronous edges. The shift happens at the sample where the deglitcher
// output goes from one to zero. The data line goes through a two-flop synchronizer.
// Parity is not checked. The shift register, its all-ones reset and the
// HC[4] deglitcher follow the original design; the data synchronizer and
// holding a complete code until it is read are this design's choices.
module ps2_kbd (
  input  logic       clk,
  input  logic       rst,
  input  logic       hc4,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  input  logic       rd,
  output logic [7:0] scancode,
  output logic       kbdv
);
  logic        hc4_d;
  logic        ck_s;           // deglitched keyboard clock
  logic [1:0]  dsync;
  logic [10:0] sr;
  logic        tick, fall;

  assign tick = hc4 && !hc4_d;
  assign fall = tick && ck_s && !ps2_clk;   // the deglitcher goes from 1 to 0

  always_ff @(posedge clk) begin
    if (rst) begin
      hc4_d  <= 1'b0;
      ck_s   <= 1'b1;
      dsync  <= 2'b11;
      sr     <= '1;
    end else begin
      hc4_d <= hc4;
      dsync <= {dsync[0], ps2_data};
      if (tick) ck_s <= ps2_clk;
      if (rd)                 sr <= '1;
      else if (fall && sr[10]) sr <= {sr[9:0], dsync[1]};
    end
  end

  // sr[9] holds data bit 0, sr[2] data bit 7
  always_comb
    for (int i = 0; i < 8; i++) scancode[i] = sr[9 - i];

  assign kbdv = !sr[10];
endmodule
