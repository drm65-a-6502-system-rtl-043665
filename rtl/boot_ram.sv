// boot_ram: 8 KB internal block RAM at the top of the 6502 address space.
// It holds the boot code and the reset vector ($FFFC/$FFFD). It is writable,
// so that a debugger can plant breakpoints. Synchronous: the address of a
// CPU cycle is registered at the clock edge that ends the cycle and its data
// appear in the next cycle, which is what the 6502 core expects. Both the
// read register and writes advance only on CPU clock enables (ce), so a
// stolen video cycle freezes the RAM together with the CPU.
// INIT_FILE (hex, optional) gives the bitstream-time contents; otherwise
// the RAM starts cleared. The boot program itself is not part of this RTL.
// Size, placement and writability follow the original design.
module boot_ram #(
  parameter int    AW        = 13,
  parameter string INIT_FILE = ""
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          sel,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = 8'h00;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      if (sel && we) mem[addr] <= wdata;
      rdata <= mem[addr];
    end
  end
endmodule
