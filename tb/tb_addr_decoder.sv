// tb_addr_decoder: sweeps all 65536 addresses through the decoder and checks
// each select against the memory map ($E000-$E00F I/O, $E010-$FFFF boot RAM,
// $0000-$DFFF external RAM), and that exactly one select is high.
module tb_addr_decoder;
  logic [15:0] addr;
  logic io_sel, ram_sel, ext_sel;
  int checks = 0, failures = 0;

  addr_decoder dut (.addr, .io_sel, .ram_sel, .ext_sel);

  initial begin
    for (int a = 0; a < 65536; a++) begin
      logic e_io, e_ram, e_ext;
      addr = 16'(a);
      #1;
      e_io  = (a >= 'hE000 && a <= 'hE00F);
      e_ram = (a >= 'hE010);
      e_ext = (a < 'hE000);
      checks++;
      if ({io_sel, ram_sel, ext_sel} != {e_io, e_ram, e_ext}) begin
        failures++;
        if (failures < 10) $display("addr %h: got %b%b%b", a, io_sel, ram_sel, ext_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
