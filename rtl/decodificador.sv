// Decoder - transmit enable for the polled computer.
//
// Inputs L3, L2, L0 are bits 3, 2 and 0 of Contador16. L3:L2 is the number
// of the PC being polled; L0 = 1 means the controller is busy with a byte
// and no PC may send. Exactly one EN_PC output is high when L0 = 0, none
// when L0 = 1. The port names follow the original; the meaning of L0 and the
// active-high polarity are this design's reading. Combinational.
module decodificador (
  input  logic       l3,
  input  logic       l2,
  input  logic       l0,
  output logic [3:0] en_pc    // EN_PC3..EN_PC0
);
  always_comb begin
    en_pc = '0;
    if (!l0) en_pc[{l3, l2}] = 1'b1;
  end
endmodule
