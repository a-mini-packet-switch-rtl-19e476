// ARx - asynchronous receiver for one RS-232 character.
//
// The selected PC's line is sampled once per baud tick BT, as in the
// original, where the receiver is clocked by the baud tick generator. In
// IDLE a low sample is taken as the start bit; the next eight ticks sample
// the data bits, least significant first, into B[7:0]; the tick after that
// samples the stop bit. A valid stop bit (1) raises E0 and freezes B until
// the controller rearms the receiver with S3; a 0 stop bit drops the
// character and the receiver waits for the next start bit (this design's
// choice). Sampling at the bit rate with no oversampling is the original's
// approach: the sample point falls wherever the tick lands inside each bit,
// which works because sender and switch use the same nominal rate.
//
// Interface: clk, rstg (RSTG or RST1 or RST2, synchronous), bt, pctx
// (serial input, idle high), s3 (rearm), b (received byte), e0 (byte ready).
// Timing: E0 rises one clock after the tick that samples the stop bit.
module arx (
  input  logic       clk,
  input  logic       rstg,
  input  logic       bt,
  input  logic       pctx,
  input  logic       s3,
  output logic [7:0] b,
  output logic       e0
);
  typedef enum logic [1:0] {RX_IDLE, RX_DATA, RX_STOP, RX_READY} rx_state_t;

  rx_state_t  state;
  logic [2:0] bitcnt;

  always_ff @(posedge clk) begin
    if (rstg || s3) begin
      state  <= RX_IDLE;
      bitcnt <= '0;
      if (rstg) b <= '0;
    end else if (bt) begin
      unique case (state)
        RX_IDLE: if (!pctx) begin
          state  <= RX_DATA;
          bitcnt <= '0;
        end
        RX_DATA: begin
          b      <= {pctx, b[7:1]};
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == 3'd7) state <= RX_STOP;
        end
        RX_STOP:  state <= pctx ? RX_READY : RX_IDLE;
        RX_READY: ;
      endcase
    end
  end

  always_comb e0 = (state == RX_READY);
endmodule
