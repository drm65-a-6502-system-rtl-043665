// mmu: minimal memory management unit of DRM65.
// The CPU space is split into eight 8 KB pages selected by address bits
// 15:13. For pages 0..6 those three bits are replaced by the 4-bit content of
// the page register of that page, so any 8 KB block of the 128 KB external
// RAM can be placed in any of the seven lower CPU pages. Page 7 has no
// register: it holds the boot RAM and the I/O space, so its physical address
// is never used (it is formed here as page value 7).
// Purely combinational; the page registers live in io_regs. The mapping
// rule follows the original design; the page-7 value is this design's.
module mmu #(
  parameter int NPAGES = 7,
  parameter int PBITS  = 4
) (
  input  logic [15:0]                  cpu_addr,
  input  logic [NPAGES-1:0][PBITS-1:0] page,
  output logic [PBITS+12:0]            phys_addr
);
  logic [2:0] pidx;
  always_comb begin
    pidx = cpu_addr[15:13];
    if (int'(pidx) < NPAGES) phys_addr = {page[pidx], cpu_addr[12:0]};
    else                     phys_addr = {PBITS'(pidx), cpu_addr[12:0]};
  end
endmodule
