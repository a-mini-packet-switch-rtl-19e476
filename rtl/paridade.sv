// Parity checker / generator.
//
// The frame carries even parity in b09 over the message byte b19..b12 and
// the header bits b08..b02. The checker XORs the sixteen bits Q[19:12] and
// Q[9:2]; a 1 means an odd count, i.e. a corrupted packet, and while S4 is
// high that raises RST1, which clears every block except Contador16 so the
// packet is dropped. The generator output NB9 is the parity of Q[19:12] and
// Q[8:2], recomputed after the TTL bits have been rewritten. The ports
// and the bits they cover are the original's. Combinational.
module paridade
  import mps_pkg::*;
(
  input  logic       s4,
  input  logic [7:0] q_msg,   // Q[19..12]
  input  logic [7:0] q_hdr,   // Q[9..2]
  output logic       rst1,
  output logic       nb9
);
  always_comb begin
    rst1 = s4 & (^{q_msg, q_hdr});
    nb9  = even_parity(q_msg, q_hdr[6:0]);
  end
endmodule
