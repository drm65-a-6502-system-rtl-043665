// tb_mmu: loads random page registers and checks the physical address of
// random CPU addresses: {PAGEn, A12..A0} for pages 0-6, {7, A12..A0} above.
module tb_mmu;
  logic [15:0] cpu_addr;
  logic [6:0][3:0] page;
  logic [16:0] phys_addr;
  int checks = 0, failures = 0;

  mmu dut (.cpu_addr, .page, .phys_addr);

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [16:0] exp;
      for (int i = 0; i < 7; i++) page[i] = 4'($urandom);
      cpu_addr = 16'($urandom);
      #1;
      if (cpu_addr[15:13] == 3'd7) exp = {4'd7, cpu_addr[12:0]};
      else exp = {page[cpu_addr[15:13]], cpu_addr[12:0]};
      checks++;
      if (phys_addr !== exp) begin
        failures++;
        if (failures < 10) $display("addr %h: got %h exp %h", cpu_addr, phys_addr, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
