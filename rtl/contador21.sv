// Contador21 - transmit bit counter.
//
// While S12 is high it passes the next N baud ticks (N = 21 in the
// original, one per frame bit) to the shift register as BTP, so the frame
// leaves on Q[0] at the line rate. After the N-th tick it raises E2 and
// returns its count to zero; E2 stays high until the controller drops S12.
//
// Interface: clk, rst (RSTG or RST1 or RST2), bt (baud tick), s12
// (enable), btp (shift pulse, one clock wide), e2 (done). Timing: BTP
// coincides with the first N baud ticks after S12 rises; E2 rises on the
// clock after the N-th one.
module contador21 #(
  parameter int unsigned N = 21
) (
  input  logic clk,
  input  logic rst,
  input  logic bt,
  input  logic s12,
  output logic btp,
  output logic e2
);
  localparam int unsigned CW = $clog2(N);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      e2  <= 1'b0;
    end else if (!s12) begin
      e2  <= 1'b0;
    end else if (!e2 && bt) begin
      if (cnt == CW'(N - 1)) begin
        cnt <= '0;
        e2  <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb btp = s12 & ~e2 & bt;
endmodule
