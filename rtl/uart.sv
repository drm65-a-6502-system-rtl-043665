// uart: fixed-format serial port, 8 data bits, no parity, 1 stop bit.
// The bit time is DIVISOR clocks (217 at 25 MHz gives 115207 bps).
// Transmitter: a write (wr_tx) goes to a one-byte holding register; when the
// shift register is idle the byte moves there and is sent LSB first.
//   thre: the holding register is free (a new byte may be queued)
//   tend: holding and shift registers are both empty (line idle)
// A write while thre is low is dropped.
// Receiver: rxd passes a two-flop synchronizer; a falling edge starts a
// frame, the start bit is checked at half a bit time and each following bit
// is sampled one bit time later. After the stop bit the byte moves to the
// receive holding register:
//   dv: a byte is waiting (cleared by rd_rx)
//   ov: a byte arrived while dv was set (the new byte replaces the old one;
//       cleared by rd_rx)
//   fe: the stop bit of the last byte was low
// Format, rate and the two holding registers follow the original design; the
// mid-bit sampling, flag clearing on URXD reads and dropping writes to a full
// transmitter are this design's choices.
module uart #(
  parameter int DIVISOR = 217
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       wr_tx,
  input  logic [7:0] tx_data,
  input  logic       rd_rx,
  output logic [7:0] rx_data,
  output logic       thre,
  output logic       tend,
  output logic       dv,
  output logic       ov,
  output logic       fe,
  output logic       txd,
  input  logic       rxd
);
  localparam int CW = $clog2(DIVISOR + 1);

  // ---------------- transmitter ----------------
  logic [7:0]    thr;
  logic          thr_full;
  logic [8:0]    tsr;        // data bits then stop bit, LSB first
  logic [3:0]    tbits;      // bits left to send after the current one
  logic          tbusy;
  logic [CW-1:0] tcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      thr_full <= 1'b0;
      thr      <= '0;
      tsr      <= '1;
      tbits    <= '0;
      tbusy    <= 1'b0;
      tcnt     <= '0;
      txd      <= 1'b1;
    end else begin
      if (!tbusy) begin
        if (thr_full) begin            // start bit
          tsr      <= {1'b1, thr};
          thr_full <= 1'b0;
          tbusy    <= 1'b1;
          tbits    <= 4'd9;
          tcnt     <= CW'(DIVISOR - 1);
          txd      <= 1'b0;
        end
      end else if (tcnt != 0) begin
        tcnt <= tcnt - 1'b1;
      end else if (tbits != 0) begin
        txd   <= tsr[0];
        tsr   <= {1'b1, tsr[8:1]};
        tbits <= tbits - 1'b1;
        tcnt  <= CW'(DIVISOR - 1);
      end else begin
        tbusy <= 1'b0;
      end
      // a write is taken when the holding register is empty or is being
      // emptied into the shift register in this same clock
      if (wr_tx && (!thr_full || !tbusy)) begin
        thr      <= tx_data;
        thr_full <= 1'b1;
      end
    end
  end

  assign thre = !thr_full;
  assign tend = !thr_full && !tbusy;

  // ---------------- receiver ----------------
  logic [1:0]    rsync;
  logic          rx;
  logic          rbusy;
  logic [3:0]    rbits;      // samples taken in this frame
  logic [CW-1:0] rcnt;
  logic [7:0]    rsr;

  assign rx = rsync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      rsync   <= 2'b11;
      rbusy   <= 1'b0;
      rbits   <= '0;
      rcnt    <= '0;
      rsr     <= '0;
      rx_data <= '0;
      dv      <= 1'b0;
      ov      <= 1'b0;
      fe      <= 1'b0;
    end else begin
      rsync <= {rsync[0], rxd};
      if (rd_rx) begin
        dv <= 1'b0;
        ov <= 1'b0;
      end
      if (!rbusy) begin
        if (!rx) begin
          rbusy <= 1'b1;
          rbits <= '0;
          rcnt  <= CW'(DIVISOR / 2 - 1);
        end
      end else if (rcnt != 0) begin
        rcnt <= rcnt - 1'b1;
      end else begin
        rcnt <= CW'(DIVISOR - 1);
        if (rbits == 0) begin
          if (rx) rbusy <= 1'b0;        // false start
          else    rbits <= 4'd1;
        end else if (rbits < 4'd9) begin
          rsr   <= {rx, rsr[7:1]};
          rbits <= rbits + 1'b1;
        end else begin                  // stop bit
          rbusy   <= 1'b0;
          rx_data <= rsr;
          fe      <= !rx;
          dv      <= 1'b1;
          if (dv && !rd_rx) ov <= 1'b1;
        end
      end
    end
  end
endmodule
