// TTL latch - holds the decremented TTL between compare and write-back.
//
// On a clock where S6 is high it stores NB07:NB06 from Deccomp; the stored
// value feeds the shift register's NB[1:0] inputs, which S7 then loads into
// b07..b06. The original calls it a latch; it is written here as an
// enabled D register. Cleared by any reset (RSTG, RST1, RST2).
module ttl_latch (
  input  logic       clk,
  input  logic       rst,
  input  logic       s6,
  input  logic [1:0] nb_in,   // {NB07, NB06}
  output logic [1:0] nb       // to shift register NB[1:0]
);
  always_ff @(posedge clk) begin
    if (rst)     nb <= '0;
    else if (s6) nb <= nb_in;
  end
endmodule
