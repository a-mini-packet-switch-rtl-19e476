// Contador10 - shift pulse counter for the first byte.
//
// While S2 is high it raises SP for N consecutive clocks (N = 10 in the
// original), moving the first received byte from b19..b12 down to b09..b02.
// After the N-th pulse it raises E1 and returns its count to zero; E1 stays
// high until the controller drops S2. One pulse per system clock is this
// design's choice.
//
// Interface: clk, rst (RSTG or RST1 or RST2), s2 (enable), sp (shift
// pulse), e1 (done). Timing: SP high in the first N clocks after S2 rises,
// E1 high from the clock after the last pulse.
module contador10 #(
  parameter int unsigned N = 10
) (
  input  logic clk,
  input  logic rst,
  input  logic s2,
  output logic sp,
  output logic e1
);
  localparam int unsigned CW = $clog2(N);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      e1  <= 1'b0;
    end else if (!s2) begin
      e1  <= 1'b0;
    end else if (!e1) begin
      if (cnt == CW'(N - 1)) begin
        cnt <= '0;
        e1  <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb sp = s2 & ~e1;
endmodule
