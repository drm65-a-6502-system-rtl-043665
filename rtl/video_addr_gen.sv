// video_addr_gen: video memory address and fetch strobe.
// Video memory is read 16 bits at a time, so the address has no bit 0. It is
// a concatenation of counter bits (VA16 and VA15 are always zero):
//   1 bpp (vmod=0): VA14..VA1 = VC[8:0], HC[8:4]   - a fetch every 16 clocks
//   4 bpp (vmod=1): VA14..VA1 = VC[8:1], HC[8:3]   - a fetch every 8 clocks
// Dropping VC[0] in 4 bpp shows every line twice (256x200). Fetches happen
// only while dv is high, at HC[3:0]=0 or HC[2:0]=0, so the highest word read
// is 0x31FF (byte 0x63FF). Combinational. The bit concatenation follows the
// original design; the fetch phase within the 16 or 8 clocks is this
// design's choice.
module video_addr_gen (
  input  logic [9:0]  hc,
  input  logic [9:0]  vc,
  input  logic        dv,
  input  logic        vmod,
  output logic        fetch,
  output logic [15:0] vaddr
);
  always_comb begin
    if (vmod) begin
      fetch = dv && (hc[2:0] == 3'd0);
      vaddr = {2'b00, vc[8:1], hc[8:3]};
    end else begin
      fetch = dv && (hc[3:0] == 4'd0);
      vaddr = {2'b00, vc[8:0], hc[8:4]};
    end
  end
endmodule
