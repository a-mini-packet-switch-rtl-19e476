// Shared constants and types of the mini packet switch.
//
// A packet travels as one 21-bit frame, sent LSB first as two RS-232
// characters with their start and stop bits embedded in the frame:
//
//   b20      stop            b10      stop
//   b19..b12 message byte    b09      even parity
//   b11      start           b08      message type
//                            b07..b06 time-to-live (TTL)
//                            b05..b04 source PC
//                            b03..b02 destination PC
//                            b01      start
//                            b00      stop (line idle before the frame)
//
// The bit layout and the 21-bit frame are those of the original switch;
// the controller-output names S0..S12 are kept as indices into S[12:0].
package mps_pkg;

  localparam int unsigned FRAME_W = 21;   // bits per frame
  localparam int unsigned N_PC    = 4;    // attached computers
  localparam int unsigned N_S     = 13;   // controller outputs S[12:0]

  typedef struct packed {
    logic       stop2;     // b20
    logic [7:0] msg;       // b19..b12
    logic       start2;    // b11
    logic       stop1;     // b10
    logic       parity;    // b09
    logic       msg_type;  // b08
    logic [1:0] ttl;       // b07..b06
    logic [1:0] src;       // b05..b04
    logic [1:0] dst;       // b03..b02
    logic       start1;    // b01
    logic       stop0;     // b00
  } frame_t;

  // Controller output indices (S0..S12).
  localparam int unsigned S_NEXT_PC   = 0;   // step Contador16
  localparam int unsigned S_LOAD_BYTE = 1;   // load ARx byte into b19..b12
  localparam int unsigned S_SHIFT10   = 2;   // run Contador10
  localparam int unsigned S_REARM     = 3;   // rearm ARx
  localparam int unsigned S_PAR_CHK   = 4;   // allow RST1
  localparam int unsigned S_TTL_CHK   = 5;   // allow RST2
  localparam int unsigned S_TTL_LATCH = 6;   // latch new TTL
  localparam int unsigned S_TTL_LOAD  = 7;   // load TTL into b07..b06
  localparam int unsigned S_PAR_LATCH = 8;   // latch new parity
  localparam int unsigned S_PAR_LOAD  = 9;   // load parity into b09
  localparam int unsigned S_DST_LATCH = 10;  // latch destination ID
  localparam int unsigned S_FRAMING   = 11;  // set start/stop bits
  localparam int unsigned S_XMIT      = 12;  // run Contador21

  // Even parity bit over the message byte and header bits b08..b02.
  function automatic logic even_parity(logic [7:0] msg, logic [6:0] hdr);
    return ^{msg, hdr};
  endfunction

endpackage
