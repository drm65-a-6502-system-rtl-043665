// tb_cpu_data_mux: drives random selects and data and checks that cpu_din in
// cycle N+1 is the boot RAM data if the RAM was selected in cycle N, else the
// I/O or SRAM byte of cycle N, and that nothing changes while ce is low.
module tb_cpu_data_mux;
  logic clk = 0, rst, ce, ram_sel, io_sel;
  logic [7:0] ext_data, io_data, ram_data, cpu_din;
  logic       exp_ram;
  logic [7:0] exp_reg;
  int checks = 0, failures = 0;

  cpu_data_mux dut (.clk, .rst, .ce, .ram_sel, .io_sel, .ext_data, .io_data, .ram_data, .cpu_din);

  always #5 clk = ~clk;

  initial begin
    rst = 1; ce = 1; ram_sel = 0; io_sel = 0; ext_data = 0; io_data = 0; ram_data = 0;
    @(negedge clk); rst = 0;
    exp_ram = 0; exp_reg = 0;
    for (int n = 0; n < 4000; n++) begin
      int s; s = $urandom_range(0, 2);
      ram_sel = (s == 0); io_sel = (s == 1);
      ext_data = 8'($urandom); io_data = 8'($urandom);
      ce = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (ce) begin
        exp_ram = ram_sel;
        exp_reg = io_sel ? io_data : ext_data;
      end
      @(negedge clk);
      ram_data = 8'($urandom);
      #1;
      checks++;
      if (cpu_din !== (exp_ram ? ram_data : exp_reg)) begin
        failures++;
        if (failures < 10) $display("n=%0d got %h", n, cpu_din);
      end
    end
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
