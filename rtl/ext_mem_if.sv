// ext_mem_if: interface to the external 64Kx16 asynchronous SRAM.
// It plays the part of the SB_IO bidirectional pins plus the byte-lane logic:
//  * CPU accesses are 8 bits wide. Byte address bit 0 selects the lane: even
//    bytes are in the low half of the word (BLE), odd bytes in the high half
//    (BHE). On a write the byte is driven on both halves and only the lane of
//    the address is enabled. On a read the byte of that lane is returned.
//  * Video reads are 16 bits wide, with both lanes enabled.
//  * A video fetch owns the bus for its cycle. If the CPU is addressing the
//    external RAM in that cycle it is stalled (cpu_stall, which the system
//    uses as the inverse of the CPU clock enable); a CPU cycle that addresses
//    the boot RAM or the I/O registers goes on in parallel.
// The pad tristate is represented by sram_dq_o / sram_dq_oe / sram_dq_i.
// Combinational: the SRAM is asynchronous, so address, lane enables and
// data are valid through the cycle and read data are captured by the CPU data
// register or the video shifter at its end. The write strobe is low only in
// the second (clock low) half of a CPU write cycle, so the address is settled
// before it falls and still held when it rises at the next clock edge; on the
// FPGA this is the DDR output register of the WE pin. This pulse shape is
// this design's choice.
module ext_mem_if (
  input  logic        clk,
  input  logic        video_fetch,
  input  logic [15:0] video_addr,
  input  logic [16:0] cpu_phys,
  input  logic        cpu_ext_sel,
  input  logic        cpu_we,
  input  logic [7:0]  cpu_dout,
  output logic        cpu_stall,
  output logic [7:0]  cpu_rbyte,
  output logic [15:0] video_rdata,
  output logic [15:0] sram_addr,
  output logic [15:0] sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [15:0] sram_dq_i,
  output logic        sram_we_n,
  output logic        sram_oe_n,
  output logic        sram_bhe_n,
  output logic        sram_ble_n
);
  logic cpu_write;

  always_comb begin
    cpu_stall   = video_fetch && cpu_ext_sel;
    cpu_write   = cpu_ext_sel && cpu_we && !video_fetch;
    sram_dq_o   = {cpu_dout, cpu_dout};
    sram_dq_oe  = cpu_write;
    sram_we_n   = !(cpu_write && !clk);
    sram_oe_n   = cpu_write;
    if (video_fetch) begin
      sram_addr  = video_addr;
      sram_bhe_n = 1'b0;
      sram_ble_n = 1'b0;
    end else begin
      sram_addr  = cpu_phys[16:1];
      sram_bhe_n = !cpu_phys[0];
      sram_ble_n = cpu_phys[0];
    end
    cpu_rbyte   = cpu_phys[0] ? sram_dq_i[15:8] : sram_dq_i[7:0];
    video_rdata = sram_dq_i;
  end
endmodule
