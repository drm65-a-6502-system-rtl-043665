// tb_video_addr_gen: sweeps the raster in both modes and checks the fetch
// strobe (every 16 or 8 clocks inside dv only), the concatenated address,
// the number of fetches per frame and the highest address (word 0x31FF).
module tb_video_addr_gen;
  logic [9:0] hc, vc;
  logic dv, vmod, fetch;
  logic [15:0] vaddr;
  int checks = 0, failures = 0;
  int nf, maxa;

  video_addr_gen dut (.hc, .vc, .dv, .vmod, .fetch, .vaddr);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s hc=%0d vc=%0d m=%0d a=%h", what, hc, vc, vmod, vaddr);
    end
  endtask

  initial begin
    for (int m = 0; m < 2; m++) begin
      vmod = m[0]; nf = 0; maxa = 0;
      for (int y = 0; y < 525; y++)
        for (int x = 0; x < 800; x++) begin
          hc = 10'(x); vc = 10'(y); dv = (x < 512 && y < 400);
          #1;
          chk(fetch == (dv && (x % (m ? 8 : 16) == 0)), "fetch");
          if (fetch) begin
            int exp; exp = m ? (y / 2) * 64 + x / 8 : y * 32 + x / 16;
            chk(int'(vaddr) == exp, "addr");
            nf++;
            if (int'(vaddr) > maxa) maxa = int'(vaddr);
          end
        end
      chk(nf == (m ? 64 : 32) * 400, "fetch count");
      chk(maxa == 'h31FF, "max addr");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
