// irq_ctrl: interrupt logic of the DRM65 peripherals.
// Sources and flags (flags are readable in USTAT, STAT1 and STAT2):
//   frxi = dv   & ERXI     UART byte received
//   ftxi = thre & ETXI     UART transmit holding register free
//   fvsi  set at a VSYNC falling edge when EVSI=1, cleared by writing CVSI
//   fhsi  set at an HSYNC falling edge when EHSI=1, cleared by writing CHSI
//   fkbi = kbdv & EKBI     scan code waiting (cleared by reading KBD)
//   delayed interrupt: writing SDLI raises a request DELAY CPU cycles later
//   (for single stepping in a debugger); writing CDLI clears it at once.
// irq is the OR of all of them and is active high.
// Sync edges are detected on every clock; the delay counts CPU clock
// enables, starting at the cycle after the write. Sources, flags and the
// 23-cycle delay follow the original register description; counting CPU
// cycles, gating sync flags by the enable at the edge, and the output
// polarity are this design's choices.
module irq_ctrl #(
  parameter int DELAY = 23
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       erxi,
  input  logic       etxi,
  input  logic       evsi,
  input  logic       ehsi,
  input  logic       ekbi,
  input  logic       dv,
  input  logic       thre,
  input  logic       kbdv,
  input  logic       hsync_n,
  input  logic       vsync_n,
  input  logic       sdli,
  input  logic       cdli,
  input  logic       cvsi,
  input  logic       chsi,
  output logic       frxi,
  output logic       ftxi,
  output logic       fvsi,
  output logic       fhsi,
  output logic       fkbi,
  output logic       irq
);
  localparam int DW = $clog2(DELAY + 1);

  logic          hs_d, vs_d;
  logic          dly_run, dly_irq;
  logic [DW-1:0] dly_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      hs_d    <= 1'b1;
      vs_d    <= 1'b1;
      fhsi    <= 1'b0;
      fvsi    <= 1'b0;
      dly_run <= 1'b0;
      dly_irq <= 1'b0;
      dly_cnt <= '0;
    end else begin
      hs_d <= hsync_n;
      vs_d <= vsync_n;
      if (chsi)                         fhsi <= 1'b0;
      else if (ehsi && hs_d && !hsync_n) fhsi <= 1'b1;
      if (cvsi)                         fvsi <= 1'b0;
      else if (evsi && vs_d && !vsync_n) fvsi <= 1'b1;

      if (cdli) begin
        dly_run <= 1'b0;
        dly_irq <= 1'b0;
      end else if (sdli) begin
        dly_run <= 1'b1;
        dly_cnt <= DW'(DELAY - 1);
      end else if (ce && dly_run) begin
        if (dly_cnt == 0) begin
          dly_run <= 1'b0;
          dly_irq <= 1'b1;
        end else begin
          dly_cnt <= dly_cnt - 1'b1;
        end
      end
    end
  end

  always_comb begin
    frxi = dv && erxi;
    ftxi = thre && etxi;
    fkbi = kbdv && ekbi;
    irq  = frxi || ftxi || fvsi || fhsi || fkbi || dly_irq;
  end
endmodule
