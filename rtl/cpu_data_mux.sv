// cpu_data_mux: data-in path of the 6502 core.
// The core expects synchronous memory: data for the address of cycle N must
// arrive in cycle N+1. The boot RAM already behaves so. The external SRAM
// and the I/O registers are asynchronous, so their read data are captured in
// a register at the end of cycle N, and the select of the output mux (boot
// RAM or that register) is delayed by one CPU cycle to match.
// Both registers advance only on CPU clock enables (ce). The register and
// delayed select are the original design's; the clock enable replaces its
// CPU clock and is this design's choice.
module cpu_data_mux (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       ram_sel,
  input  logic       io_sel,
  input  logic [7:0] ext_data,
  input  logic [7:0] io_data,
  input  logic [7:0] ram_data,
  output logic [7:0] cpu_din
);
  logic       ram_sel_d;
  logic [7:0] din_reg;

  always_ff @(posedge clk) begin
    if (rst) begin
      ram_sel_d <= 1'b0;
      din_reg   <= 8'h00;
    end else if (ce) begin
      ram_sel_d <= ram_sel;
      din_reg   <= io_sel ? io_data : ext_data;
    end
  end

  assign cpu_din = ram_sel_d ? ram_data : din_reg;
endmodule
