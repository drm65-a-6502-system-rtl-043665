// tb_boot_ram: writes random bytes, reads them back against a reference
// array, checks the one-cycle read latency, that unselected or ce-low writes
// are ignored and that the read register holds while ce is low.
module tb_boot_ram;
  logic clk = 0, ce, sel, we;
  logic [12:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] ref_mem [8192];
  int checks = 0, failures = 0;

  boot_ram dut (.clk, .ce, .sel, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, rdata, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 8192; i++) ref_mem[i] = 8'h00;
    ce = 1; sel = 0; we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      int op; op = $urandom_range(0, 3);
      addr  = 13'($urandom_range(0, 63));
      wdata = 8'($urandom);
      ce    = ($urandom_range(0, 7) != 0);
      sel   = ($urandom_range(0, 7) != 0);
      we    = (op == 0);
      @(negedge clk);
      if (ce && sel && we) ref_mem[addr] = wdata;
      if (ce && !we) check(ref_mem[addr], "read");
    end
    // hold while ce is low
    ce = 1; we = 0; addr = 13'd5; @(negedge clk);
    ce = 0; addr = 13'd6; @(negedge clk); @(negedge clk);
    check(ref_mem[5], "hold");
    // top address
    ce = 1; sel = 1; we = 1; addr = 13'h1FFF; wdata = 8'hA5; @(negedge clk);
    we = 0; @(negedge clk);
    check(8'hA5, "top");
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
