// BTG - baud tick generator.
//
// A free-running modulo-DIV counter on the system clock. Each time it wraps
// it raises BT for exactly one clock, so BT marks the start of every bit
// time of the serial lines. The original divides the 4 MHz crystal clock
// down to the 9600 Bd line rate; here DIV defaults to round(4e6/9600) = 417
// (9592 Bd, 0.08 % slow). Using BT as a one-clock enable instead of a
// derived clock keeps the whole switch in one clock domain - this design's
// choice. Only the general reset RSTG clears the counter.
//
// Interface: clk, rstg (active high, synchronous), bt (1-clock pulse).
// Timing: first BT DIV clocks after reset is released, then every DIV clocks.
module btg #(
  parameter int unsigned CLK_HZ = 4_000_000,
  parameter int unsigned BAUD   = 9600,
  parameter int unsigned DIV    = (CLK_HZ + BAUD / 2) / BAUD
) (
  input  logic clk,
  input  logic rstg,
  output logic bt
);
  localparam int unsigned CW = $clog2(DIV);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rstg) begin
      cnt <= '0;
      bt  <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt <= '0;
      bt  <= 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
      bt  <= 1'b0;
    end
  end

  initial assert (DIV >= 2) else $error("btg: DIV must be at least 2");
endmodule
