// MUX - selects which computer's serial line reaches the receiver.
//
// A 4:1 multiplexer: the two-bit line selection (bits 3:2 of Contador16,
// the PC number currently being polled) picks one of the four incoming
// RS-232 lines and passes it to ARx. Combinational, no timing of its own.
module pc_mux (
  input  logic [3:0] pc_tx,   // serial lines from PC0..PC3
  input  logic [1:0] sel,     // PC number
  output logic       pctx     // to ARx
);
  always_comb pctx = pc_tx[sel];
endmodule
