// Deccomp - TTL decrement and compare.
//
// Subtracts one from the two-bit TTL field (Q7:Q6 of the frame) and
// compares the result with zero. While S5 is high a zero result raises
// RST2, which clears every block except Contador16 so the packet is
// dropped. NB07:NB06 is the decremented TTL, to be latched and written back.
// The zero test is made on the decremented value, as the original
// describes it; a received TTL of 0 wraps to 3 and is forwarded, which is
// this design's reading of a case the original does not discuss.
// Combinational.
module deccomp (
  input  logic s5,
  input  logic q7,
  input  logic q6,
  output logic rst2,
  output logic nb07,
  output logic nb06
);
  logic [1:0] nttl;

  always_comb begin
    nttl        = {q7, q6} - 2'd1;
    {nb07, nb06} = nttl;
    rst2        = s5 & (nttl == 2'd0);
  end
endmodule
