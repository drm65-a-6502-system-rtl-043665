// tb_irq_ctrl: checks each interrupt source on its own: the UART and
// keyboard flags follow source AND enable; sync flags are set only by a
// falling edge while enabled and stay until cleared; the delayed interrupt
// appears exactly DELAY=23 CPU cycles (clock enables) after the SDLI write,
// with ce toggling, and CDLI removes it.
module tb_irq_ctrl;
  logic clk = 0, rst, ce;
  logic erxi, etxi, evsi, ehsi, ekbi, dv, thre, kbdv, hsync_n, vsync_n;
  logic sdli, cdli, cvsi, chsi;
  logic frxi, ftxi, fvsi, fhsi, fkbi, irq;
  int checks = 0, failures = 0;

  irq_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s at %0t", what, $time);
    end
  endtask

  initial begin
    rst = 1; ce = 1; {erxi, etxi, evsi, ehsi, ekbi} = '0; {dv, thre, kbdv} = '0;
    hsync_n = 1; vsync_n = 1; {sdli, cdli, cvsi, chsi} = '0;
    repeat (2) @(negedge clk); rst = 0; @(negedge clk);
    chk(!irq, "quiet after reset");
    // combinational flags
    for (int n = 0; n < 64; n++) begin
      {erxi, etxi, ekbi, dv, thre, kbdv} = 6'(n);
      #1;
      chk(frxi == (erxi && dv) && ftxi == (etxi && thre) && fkbi == (ekbi && kbdv), "and flags");
      chk(irq == ((erxi && dv) || (etxi && thre) || (ekbi && kbdv)), "irq or");
    end
    {erxi, etxi, ekbi, dv, thre, kbdv} = '0;
    // hsync edge while disabled: no flag
    @(negedge clk); hsync_n = 0; @(negedge clk); @(negedge clk);
    chk(!fhsi, "disabled edge");
    hsync_n = 1; ehsi = 1; @(negedge clk);
    chk(!fhsi, "no edge yet");
    hsync_n = 0; @(negedge clk); @(negedge clk);
    chk(fhsi && irq, "hsync edge");
    hsync_n = 1; @(negedge clk); @(negedge clk);
    chk(fhsi, "flag stays");
    chsi = 1; @(negedge clk); chsi = 0;
    chk(!fhsi && !irq, "chsi clears");
    // vsync
    evsi = 1; vsync_n = 0; @(negedge clk); @(negedge clk);
    chk(fvsi && irq, "vsync edge");
    cvsi = 1; @(negedge clk); cvsi = 0;
    chk(!fvsi, "cvsi clears");
    vsync_n = 1; ehsi = 0; evsi = 0;
    // delayed interrupt, ce high two cycles out of three
    for (int trial = 0; trial < 3; trial++) begin
      int ces;
      ces = 0;
      sdli = 1; ce = 1; @(negedge clk); sdli = 0;
      while (!irq) begin
        ce = ($urandom_range(0, 2) != 0);
        @(posedge clk);
        if (ce) ces++;
        @(negedge clk);
        if (ces > 40) break;
      end
      chk(ces == 23, $sformatf("delay %0d", ces));
      repeat (5) @(negedge clk);
      chk(irq, "delayed irq pending");
      cdli = 1; @(negedge clk); cdli = 0;
      chk(!irq, "cdli clears");
    end
    // CDLI while counting cancels
    ce = 1; sdli = 1; @(negedge clk); sdli = 0;
    repeat (10) @(negedge clk);
    cdli = 1; @(negedge clk); cdli = 0;
    repeat (40) @(negedge clk);
    chk(!irq, "cancelled");
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
