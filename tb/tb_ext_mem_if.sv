// tb_ext_mem_if: random CPU and video requests; checks the SRAM address,
// byte enables (even byte low lane, odd byte high lane, video both), write
// strobe (low only in the clock-low half of a write) and data, the byte returned to the CPU, and that the CPU is stalled
// exactly when a video fetch and a CPU SRAM access meet.
module tb_ext_mem_if;
  logic        clk, video_fetch, cpu_ext_sel, cpu_we, cpu_stall, sram_dq_oe;
  logic [15:0] video_addr, video_rdata, sram_addr, sram_dq_o, sram_dq_i;
  logic [16:0] cpu_phys;
  logic [7:0]  cpu_dout, cpu_rbyte;
  logic        sram_we_n, sram_oe_n, sram_bhe_n, sram_ble_n;
  int checks = 0, failures = 0;

  ext_mem_if dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s failed: vf=%b ext=%b we=%b phys=%h", what, video_fetch, cpu_ext_sel, cpu_we, cpu_phys);
    end
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      video_fetch = 1'($urandom); video_addr = 16'($urandom);
      cpu_phys = 17'($urandom); cpu_ext_sel = 1'($urandom); cpu_we = 1'($urandom);
      cpu_dout = 8'($urandom); sram_dq_i = 16'($urandom); clk = 1'($urandom);
      #1;
      chk(cpu_stall == (video_fetch && cpu_ext_sel), "stall");
      if (video_fetch) begin
        chk(sram_addr == video_addr && !sram_bhe_n && !sram_ble_n && sram_we_n && !sram_oe_n && !sram_dq_oe, "video");
        chk(video_rdata == sram_dq_i, "vdata");
      end else begin
        chk(sram_addr == cpu_phys[16:1], "cpu addr");
        chk(sram_ble_n == cpu_phys[0] && sram_bhe_n == !cpu_phys[0], "lanes");
        chk(sram_we_n == !(cpu_ext_sel && cpu_we && !clk), "we");
        chk(sram_dq_oe == (cpu_ext_sel && cpu_we), "oe");
        if (cpu_ext_sel && cpu_we) chk(cpu_phys[0] ? sram_dq_o[15:8] == cpu_dout : sram_dq_o[7:0] == cpu_dout, "wdata");
        chk(cpu_rbyte == (cpu_phys[0] ? sram_dq_i[15:8] : sram_dq_i[7:0]), "rbyte");
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
