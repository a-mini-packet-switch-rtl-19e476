// Contador16 - polling counter.
//
// A modulo-16 counter advanced by one on every clock in which the
// controller raises S0. Bits 3:2 name the PC being polled (MUX select and
// decoder L3:L2); bit 0 disables that PC while the switch consumes a byte
// (decoder L0). Serving one PC takes four steps: enable for byte 1,
// disable, enable for byte 2, disable; the next step enables the next PC, so
// the counter wraps after all four PCs. Unlike every other block it is not
// cleared by the parity or TTL resets, only by RSTG, so polling moves on to
// the next PC after a dropped packet. The modulo and the reset rule are the
// original's; the bit assignment is this design's reading.
module contador16 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rstg,
  input  logic             s0,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rstg)    q <= '0;
    else if (s0) q <= q + 1'b1;
  end
endmodule
