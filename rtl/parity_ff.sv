// Parity flip-flop - holds the regenerated parity bit.
//
// On a clock where S8 is high it stores NB9 from the parity generator; S9
// then loads the stored bit into b09 of the shift register through its CCP
// cell. A D flip-flop as in the original, with a synchronous clear by any
// reset (RSTG, RST1, RST2).
module parity_ff (
  input  logic clk,
  input  logic rst,
  input  logic s8,
  input  logic d,
  output logic q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= 1'b0;
    else if (s8) q <= d;
  end
endmodule
