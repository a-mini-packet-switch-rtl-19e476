// Controller - the sequencer of the switch.
//
// A Moore state machine: each state raises at most one of the outputs
// S[12:0] (named in mps_pkg), and the three inputs E0 (byte received), E1
// (Contador10 done) and E2 (Contador21 done) move it on. One packet is
// handled as follows:
//
//   WAIT1  -E0->  DIS1 (S0: disable PC)  ->  LOAD1 (S1: byte -> b19..b12)
//   SHIFT (S2, until E1: byte moves to b09..b02)  ->  REARM1 (S3)
//   EN2 (S0: re-enable PC)  ->  WAIT2  -E0->  DIS2 (S0)  ->  LOAD2 (S1)
//   PCHK (S4: parity check)  ->  TCHK (S5: TTL check)  ->  TLAT (S6)
//   TLOAD (S7)  ->  PLAT (S8)  ->  PLOAD (S9)  ->  DLAT (S10)
//   FRAME (S11)  ->  XMIT (S12, until E2)  ->  REARM2 (S3)
//   NEXT (S0: enable next PC)  ->  WAIT1
//
// DROP is RST1 or RST2. Either can only occur in PCHK or TCHK, and it
// sends the machine to REARM2, so the dropped packet's PC is skipped and the
// next one polled. The order of operations and the output meanings are the
// original's. The original's machine has 22 states that it does not list;
// this one has 20, and the DROP input is this design's, added because the
// machine must step the polling counter after a dropped packet.
//
// Interface: clk, rstg (synchronous, active high), drop, e0, e1, e2,
// s[12:0]. Timing: outputs are registered state decodes; each single-shot
// state lasts one clock.
module controlador
  import mps_pkg::*;
(
  input  logic           clk,
  input  logic           rstg,
  input  logic           drop,
  input  logic           e0,
  input  logic           e1,
  input  logic           e2,
  output logic [N_S-1:0] s
);
  typedef enum logic [4:0] {
    ST_WAIT1, ST_DIS1, ST_LOAD1, ST_SHIFT, ST_REARM1, ST_EN2, ST_WAIT2,
    ST_DIS2, ST_LOAD2, ST_PCHK, ST_TCHK, ST_TLAT, ST_TLOAD, ST_PLAT,
    ST_PLOAD, ST_DLAT, ST_FRAME, ST_XMIT, ST_REARM2, ST_NEXT
  } ctl_state_t;

  ctl_state_t state, next;

  always_comb begin
    next = state;
    unique case (state)
      ST_WAIT1:  if (e0) next = ST_DIS1;
      ST_DIS1:   next = ST_LOAD1;
      ST_LOAD1:  next = ST_SHIFT;
      ST_SHIFT:  if (e1) next = ST_REARM1;
      ST_REARM1: next = ST_EN2;
      ST_EN2:    next = ST_WAIT2;
      ST_WAIT2:  if (e0) next = ST_DIS2;
      ST_DIS2:   next = ST_LOAD2;
      ST_LOAD2:  next = ST_PCHK;
      ST_PCHK:   next = ST_TCHK;
      ST_TCHK:   next = ST_TLAT;
      ST_TLAT:   next = ST_TLOAD;
      ST_TLOAD:  next = ST_PLAT;
      ST_PLAT:   next = ST_PLOAD;
      ST_PLOAD:  next = ST_DLAT;
      ST_DLAT:   next = ST_FRAME;
      ST_FRAME:  next = ST_XMIT;
      ST_XMIT:   if (e2) next = ST_REARM2;
      ST_REARM2: next = ST_NEXT;
      ST_NEXT:   next = ST_WAIT1;
      default:   next = ST_WAIT1;
    endcase
    if (drop) next = ST_REARM2;
  end

  always_ff @(posedge clk) begin
    if (rstg) state <= ST_WAIT1;
    else      state <= next;
  end

  always_comb begin
    s = '0;
    unique case (state)
      ST_DIS1, ST_EN2, ST_DIS2, ST_NEXT: s[S_NEXT_PC]   = 1'b1;
      ST_LOAD1, ST_LOAD2:                s[S_LOAD_BYTE] = 1'b1;
      ST_SHIFT:                          s[S_SHIFT10]   = 1'b1;
      ST_REARM1, ST_REARM2:              s[S_REARM]     = 1'b1;
      ST_PCHK:                           s[S_PAR_CHK]   = 1'b1;
      ST_TCHK:                           s[S_TTL_CHK]   = 1'b1;
      ST_TLAT:                           s[S_TTL_LATCH] = 1'b1;
      ST_TLOAD:                          s[S_TTL_LOAD]  = 1'b1;
      ST_PLAT:                           s[S_PAR_LATCH] = 1'b1;
      ST_PLOAD:                          s[S_PAR_LOAD]  = 1'b1;
      ST_DLAT:                           s[S_DST_LATCH] = 1'b1;
      ST_FRAME:                          s[S_FRAMING]   = 1'b1;
      ST_XMIT:                           s[S_XMIT]      = 1'b1;
      default:                           ;
    endcase
  end

  // At most one controller output is active at any time.
  a_onehot_s: assert property (@(posedge clk) disable iff (rstg) $onehot0(s));
  // A reset request can only follow a check state.
  a_abort_src: assert property (@(posedge clk) disable iff (rstg)
                                drop |-> (state inside {ST_PCHK, ST_TCHK}));
endmodule
