// addr_decoder: combinational chip select for the 6502 address bus.
//   $E000-$E00F  I/O registers (io_sel)
//   $E010-$FFFF  internal 8 KB boot RAM (ram_sel); the RAM block also spans
//                $E000-$E00F but is not selected there
//   $0000-$DFFF  external SRAM through the MMU (ext_sel)
// Exactly one select is high for every address. No clock, no state.
// The map is the system's own; keeping $E000-$E00F out of the RAM select is
// this design's reading of 'reserved for peripherals'.
module addr_decoder (
  input  logic [15:0] addr,
  output logic        io_sel,
  output logic        ram_sel,
  output logic        ext_sel
);
  always_comb begin
    io_sel  = (addr[15:4] == 12'hE00);
    ext_sel = (addr[15:13] != 3'b111);
    ram_sel = !ext_sel && !io_sel;
  end
endmodule
