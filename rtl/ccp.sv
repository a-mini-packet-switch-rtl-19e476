// CCP - parallel-load cell for one register bit.
//
// A purely combinational cell that turns an enable and a new bit value into
// the active-low set and reset inputs of a flip-flop. With the enable low
// both outputs are inactive (1) and the flip-flop keeps shifting normally;
// with the enable high the flip-flop is forced to the new value. The truth
// table is the original's:
//
//   en nb | set_n reset_n
//    0  x |   1     1
//    1  0 |   1     0
//    1  1 |   0     1
//
// In this design the register treats set_n/reset_n as synchronous controls
// sampled at the clock edge, not as asynchronous preset/clear.
module ccp (
  input  logic en,
  input  logic nb,
  output logic set_n,
  output logic reset_n
);
  always_comb begin
    set_n   = ~(en & nb);
    reset_n = ~(en & ~nb);
  end
endmodule
