// tb_ps2_kbd: a keyboard model sends frames (start, 8 data LSB first, odd
// parity, stop) at about 14 kHz while hc4 toggles every 16 clocks as HC[4]
// does. Checks: kbdv and the scan code after each frame, that a read sets
// the code to $FF and clears kbdv, and that a second frame sent before the
// read does not disturb the held code. A last group of frames has ringing
// on the keyboard clock: a 4-clock pulse of the opposite level soon after
// every edge, placed between two HC[4] samples. A receiver that
// edge-detected the raw clock would see three times the edges; this one must
// still decode every code.
module tb_ps2_kbd;
  localparam int HALF = 900;   // clocks per half PS2 clock period (36 us)
  logic clk = 0, rst, hc4, ps2_clk, ps2_data, rd, kbdv;
  logic [7:0] scancode;
  logic [9:0] hcnt;
  int checks = 0, failures = 0;

  ps2_kbd dut (.clk, .rst, .hc4, .ps2_clk, .ps2_data, .rd, .scancode, .kbdv);

  always #5 clk = ~clk;
  always_ff @(posedge clk) hcnt <= rst ? '0 : hcnt + 1'b1;
  assign hc4 = hcnt[4];

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s: code=%h kbdv=%b", what, scancode, kbdv);
    end
  endtask

  task automatic send(input logic [7:0] code);
    logic [10:0] frame;
    frame = {1'b1, ~^code, code, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = frame[i];
      repeat (HALF / 2) @(negedge clk);
      ps2_clk = 0;
      repeat (HALF) @(negedge clk);
      ps2_clk = 1;
      repeat (HALF / 2) @(negedge clk);
    end
    ps2_data = 1;
    repeat (HALF) @(negedge clk);
  endtask

  int raw_falls;
  always @(negedge ps2_clk) raw_falls++;

  // ringing pulse 2..5 clocks into a 32-clock sampling period
  task automatic ring(input logic level);
    @(negedge clk);
    while (hcnt[4:0] != 5'd2) @(negedge clk);
    ps2_clk = !level;
    repeat (4) @(negedge clk);
    ps2_clk = level;
  endtask

  task automatic send_ringing(input logic [7:0] code);
    logic [10:0] frame;
    frame = {1'b1, ~^code, code, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = frame[i];
      repeat (HALF / 2) @(negedge clk);
      ps2_clk = 0;
      ring(1'b0);
      repeat (HALF - 40) @(negedge clk);
      ps2_clk = 1;
      ring(1'b1);
      repeat (HALF / 2 - 40) @(negedge clk);
    end
    ps2_data = 1;
    repeat (HALF) @(negedge clk);
  endtask

  task automatic read_code();
    rd = 1; @(negedge clk); rd = 0;
  endtask

  initial begin
    rst = 1; ps2_clk = 1; ps2_data = 1; rd = 0; raw_falls = 0;
    repeat (3) @(negedge clk); rst = 0;
    repeat (100) @(negedge clk);
    chk(!kbdv && scancode == 8'hFF, "idle");
    for (int n = 0; n < 12; n++) begin
      logic [7:0] c;
      c = (n == 0) ? 8'h1C : (n == 1) ? 8'hF0 : 8'($urandom);
      send(c);
      chk(kbdv, "kbdv after frame");
      chk(scancode == c, "scan code");
      read_code();
      chk(!kbdv && scancode == 8'hFF, "cleared by read");
    end
    // a frame arriving while a code is held is ignored
    send(8'h5A);
    send(8'h33);
    chk(kbdv && scancode == 8'h5A, "held code");
    read_code();
    chk(!kbdv, "cleared");
    for (int n = 0; n < 6; n++) begin
      logic [7:0] c;
      int f0;
      c = 8'($urandom);
      f0 = raw_falls;
      send_ringing(c);
      chk(raw_falls - f0 == 33, $sformatf("ringing present (%0d raw falls)", raw_falls - f0));
      chk(kbdv && scancode == c, "code with ringing clock");
      read_code();
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
