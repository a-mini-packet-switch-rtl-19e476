// Shift register - the 21-bit frame store of the switch.
//
// Q[20:0] holds one frame in the layout of mps_pkg::frame_t. It is written
// in four ways, all synchronous to clk:
//   * reset (RSTG, RST1 or RST2): all ones, so the serial output idles high;
//   * right shift by one bit when SP (from Contador10) or BTP (from
//     Contador21) is high, shifting a 1 (line idle) in at b20;
//   * parallel load through eleven CCP cells: S1 loads B into b19..b12,
//     S7 loads NB[1:0] into the TTL bits b07..b06, S9 loads NB9 into the
//     parity bit b09;
//   * S11 forces the framing bits: stop b20, b10, b00 to 1 and start b11,
//     b01 to 0.
// Loads and framing override a shift of the same clock. Q[0] is the serial
// output towards the destination PC. Since every write puts a 1 into b20
// (reset, shift-in and framing), synthesis keeps that bit as a constant.
//
// The width, the loadable bits, the eleven CCP cells and the port list are
// the original's; the idle-high reset value, the 1 shifted in and the
// meaning of SP versus BTP are this design's reading.
module shiftreg21
  import mps_pkg::*;
#(
  parameter int unsigned W = FRAME_W
) (
  input  logic         clk,
  input  logic         rstg,
  input  logic         rst1,
  input  logic         rst2,
  input  logic [7:0]   b,      // B[19..12]
  input  logic         s1,
  input  logic [1:0]   nb,     // NB[1..0] new TTL (b07, b06)
  input  logic         s7,
  input  logic         nb9,
  input  logic         s9,
  input  logic         s11,
  input  logic         btp,
  input  logic         sp,
  output logic [W-1:0] q
);
  // Bit positions served by CCP cells.
  localparam int unsigned MSG_LO = 12;
  localparam int unsigned PAR_B  = 9;
  localparam int unsigned TTL_LO = 6;

  logic [10:0]  set_n, reset_n;
  logic [W-1:0] d;

  for (genvar i = 0; i < 8; i++) begin : g_ccp_msg
    ccp u_ccp (.en(s1), .nb(b[i]), .set_n(set_n[i]), .reset_n(reset_n[i]));
  end
  ccp u_ccp_par (.en(s9), .nb(nb9), .set_n(set_n[8]), .reset_n(reset_n[8]));
  for (genvar i = 0; i < 2; i++) begin : g_ccp_ttl
    ccp u_ccp (.en(s7), .nb(nb[i]), .set_n(set_n[9+i]), .reset_n(reset_n[9+i]));
  end

  // Apply an active-low set/reset pair to one bit.
  function automatic logic force_bit(logic cur, logic s_n, logic r_n);
    if (!s_n)      return 1'b1;
    else if (!r_n) return 1'b0;
    else           return cur;
  endfunction

  always_comb begin
    d = q;
    if (sp || btp) d = {1'b1, q[W-1:1]};
    for (int i = 0; i < 8; i++)
      d[MSG_LO+i] = force_bit(d[MSG_LO+i], set_n[i], reset_n[i]);
    d[PAR_B] = force_bit(d[PAR_B], set_n[8], reset_n[8]);
    for (int i = 0; i < 2; i++)
      d[TTL_LO+i] = force_bit(d[TTL_LO+i], set_n[9+i], reset_n[9+i]);
    if (s11) begin
      d[20] = 1'b1;
      d[11] = 1'b0;
      d[10] = 1'b1;
      d[1]  = 1'b0;
      d[0]  = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rstg || rst1 || rst2) q <= '1;
    else                      q <= d;
  end

  initial assert (W == FRAME_W) else $error("shiftreg21: W must equal the frame width");
endmodule
