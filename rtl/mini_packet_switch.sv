// Mini packet switch - top level.
//
// Four computers share one switch over RS-232 lines. The switch polls them
// in turn: the decoder enables one PC, which sends a packet as two
// characters; the receiver hands each character to the 21-bit shift
// register, the first one being shifted down into the header position.
// The parity of the packet is checked and the TTL decremented; a bad parity
// or an expired TTL drops the packet (RST1/RST2 clear everything except the
// polling counter). Otherwise the new TTL and a new parity bit are written
// back, the destination ID is latched, the start/stop bits are set and the
// whole frame is shifted out at the baud rate to the destination PC, which
// may be the sender itself. Then the next PC is polled.
//
// Interface: clk (4 MHz), rstg (general reset, synchronous, active high),
// pc_tx[3:0] (serial lines from the PCs, idle high), pc_rx[3:0] (serial
// lines to the PCs, idle high), en_pc[3:0] (transmit enable per PC).
// Timing: a forwarded packet leaves as 21 bit times on the destination's
// line, starting with a full-length idle bit b00 followed by the two
// characters; each PC must wait for its enable before sending each byte.
//
// The block structure and the signal names follow the original design; the
// single clock domain with baud-tick enables is this design's choice.
// Lint reports two unused signals, and both stand on purpose: bit 1 of the
// polling counter only separates the two enable windows of one PC and
// feeds no block, and the framing bits b20, b11, b10, b01 of the frame
// are only ever read through the serial output Q[0].
module mini_packet_switch
  import mps_pkg::*;
#(
  parameter int unsigned CLK_HZ = 4_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic             clk,
  input  logic             rstg,
  input  logic [N_PC-1:0]  pc_tx,
  output logic [N_PC-1:0]  pc_rx,
  output logic [N_PC-1:0]  en_pc
);
  logic               bt, btp, sp;
  logic               pctx, e0, e1, e2;
  logic [7:0]         rx_byte;
  logic [N_S-1:0]     s;
  logic [3:0]         cnt16;
  logic [FRAME_W-1:0] q;
  logic               rst1, rst2, rst_all;
  logic               nb9_new, nb9_held;
  logic [1:0]         ttl_new, ttl_held;

  always_comb rst_all = rstg | rst1 | rst2;

  btg #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_btg (.clk, .rstg, .bt);

  contador16 u_cnt16 (.clk, .rstg, .s0(s[S_NEXT_PC]), .q(cnt16));

  decodificador u_dec (.l3(cnt16[3]), .l2(cnt16[2]), .l0(cnt16[0]), .en_pc);

  pc_mux u_mux (.pc_tx, .sel(cnt16[3:2]), .pctx);

  arx u_arx (.clk, .rstg(rst_all), .bt, .pctx, .s3(s[S_REARM]), .b(rx_byte), .e0);

  contador10 u_cnt10 (.clk, .rst(rst_all), .s2(s[S_SHIFT10]), .sp, .e1);

  contador21 u_cnt21 (.clk, .rst(rst_all), .bt, .s12(s[S_XMIT]), .btp, .e2);

  shiftreg21 u_sr (
    .clk, .rstg, .rst1, .rst2,
    .b(rx_byte), .s1(s[S_LOAD_BYTE]),
    .nb(ttl_held), .s7(s[S_TTL_LOAD]),
    .nb9(nb9_held), .s9(s[S_PAR_LOAD]),
    .s11(s[S_FRAMING]), .btp, .sp, .q
  );

  paridade u_par (.s4(s[S_PAR_CHK]), .q_msg(q[19:12]), .q_hdr(q[9:2]), .rst1, .nb9(nb9_new));

  deccomp u_ttl (.s5(s[S_TTL_CHK]), .q7(q[7]), .q6(q[6]), .rst2, .nb07(ttl_new[1]), .nb06(ttl_new[0]));

  ttl_latch u_ttl_latch (.clk, .rst(rst_all), .s6(s[S_TTL_LATCH]), .nb_in(ttl_new), .nb(ttl_held));

  parity_ff u_par_ff (.clk, .rst(rst_all), .s8(s[S_PAR_LATCH]), .d(nb9_new), .q(nb9_held));

  pc_demux u_demux (.clk, .rst(rstg), .s10(s[S_DST_LATCH]), .q_dst(q[3:2]), .q0(q[0]), .pc_rx);

  controlador u_ctl (.clk, .rstg, .drop(rst1 | rst2), .e0, .e1, .e2, .s);
endmodule
