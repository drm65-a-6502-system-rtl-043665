// sram_64kx16: behavioural model of the board's 64Kx16 asynchronous SRAM
// (not synthesizable logic of the design; testbench use only).
// Reads are combinational while oe_n is low. A write happens while we_n is
// low, to the byte lanes enabled by ble_n (bits 7:0) and bhe_n (bits 15:8).
// Contents start at zero; testbenches may also access 'mem' directly.
module sram_64kx16 (
  input  logic [15:0] addr,
  input  logic [15:0] dq_w,
  output logic [15:0] dq_r,
  input  logic        we_n,
  input  logic        oe_n,
  input  logic        bhe_n,
  input  logic        ble_n
);
  logic [15:0] mem [65536];

  initial for (int i = 0; i < 65536; i++) mem[i] = 16'h0000;

  always @* begin
    if (!we_n) begin
      if (!ble_n) mem[addr][7:0]  = dq_w[7:0];
      if (!bhe_n) mem[addr][15:8] = dq_w[15:8];
    end
  end

  assign dq_r = oe_n ? 16'h0000 : mem[addr];
endmodule
