// pwm_audio: one-bit audio DAC driven by the video line timing.
// The output goes high at the falling edge of HSYNC and low when the
// horizontal counter equals twice the PWM level. With HSYNC starting at
// HC=592 of an 800-clock line, the high time is 208 + 2*level clocks, a
// duty cycle of 26% to 90% at 31250 Hz. The level register itself is in the
// I/O block; it should change only in the 208 clocks after the HSYNC edge.
// All of this follows the original design.
module pwm_audio (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] hc,
  input  logic       hsync_n,
  input  logic [7:0] level,
  output logic       pwm
);
  logic hs_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      hs_d <= 1'b1;
      pwm  <= 1'b0;
    end else begin
      hs_d <= hsync_n;
      if (hs_d && !hsync_n)           pwm <= 1'b1;
      else if (hc == {1'b0, level, 1'b0}) pwm <= 1'b0;
    end
  end
endmodule
