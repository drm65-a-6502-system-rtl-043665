// tb_uart: runs at a small DIVISOR. Loops txd back to rxd and sends random
// bytes through the holding register, checking THRE/TEND, the bit time on
// the line, received bytes and DV. Then checks overrun (OV) and a frame
// error (FE) injected with a low stop bit from a line model.
module tb_uart;
  localparam int DIV = 16;
  logic clk = 0, rst, wr_tx, rd_rx, thre, tend, dv, ov, fe, txd, rxd, loop;
  logic [7:0] tx_data, rx_data;
  logic       line;
  int checks = 0, failures = 0;

  uart #(.DIVISOR(DIV)) dut (.clk, .rst, .wr_tx, .tx_data, .rd_rx, .rx_data,
    .thre, .tend, .dv, .ov, .fe, .txd, .rxd);

  always #5 clk = ~clk;
  assign rxd = loop ? txd : line;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s at %0t", what, $time);
    end
  endtask

  task automatic send_line(input logic [7:0] d, input logic stop);
    line = 0; repeat (DIV) @(negedge clk);
    for (int i = 0; i < 8; i++) begin line = d[i]; repeat (DIV) @(negedge clk); end
    line = stop; repeat (DIV) @(negedge clk);
    line = 1; repeat (DIV) @(negedge clk);
  endtask

  initial begin
    rst = 1; wr_tx = 0; rd_rx = 0; tx_data = 0; loop = 1; line = 1;
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk);
    chk(thre && tend && !dv && txd, "idle");
    for (int n = 0; n < 20; n++) begin
      logic [7:0] d;
      int t0, t1;
      d = 8'($urandom);
      tx_data = d; wr_tx = 1; @(negedge clk); wr_tx = 0;
      // start bit begins on the next edge; measure it
      @(negedge txd); t0 = int'($time);
      @(negedge clk);
      chk(!tend, "tend busy");
      while (!dv) @(negedge clk);
      chk(rx_data == d, "rx data");
      chk(!fe && !ov, "no errors");
      rd_rx = 1; @(negedge clk); rd_rx = 0;
      chk(!dv, "dv cleared");
      while (!tend) @(negedge clk);
      t1 = int'($time);
      // from start bit to line idle: 10 bit times
      chk(t1 - t0 >= 10 * DIV * 10 && t1 - t0 <= 10 * DIV * 10 + 40, "frame length");
    end
    // holding register: two writes back to back, THRE drops then recovers
    tx_data = 8'h55; wr_tx = 1; @(negedge clk);
    tx_data = 8'hAA; @(negedge clk); wr_tx = 0;
    chk(!thre, "thre low with both full");
    while (!dv) @(negedge clk);
    chk(rx_data == 8'h55, "first queued");
    while (!thre) @(negedge clk);
    // second byte arrives without reading the first: overrun
    while (!tend) @(negedge clk);
    repeat (DIV) @(negedge clk);
    chk(ov && rx_data == 8'hAA, "overrun");
    rd_rx = 1; @(negedge clk); rd_rx = 0;
    chk(!ov && !dv, "ov cleared");
    // frame error
    loop = 0;
    send_line(8'h3C, 1'b0);
    chk(dv && fe && rx_data == 8'h3C, "frame error");
    rd_rx = 1; @(negedge clk); rd_rx = 0;
    send_line(8'hC3, 1'b1);
    chk(dv && !fe && rx_data == 8'hC3, "good frame");
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
