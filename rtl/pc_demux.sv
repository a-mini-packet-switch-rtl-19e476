// Output demultiplexer with destination latch.
//
// Two D flip-flops capture the destination ID bits b03:b02 of the frame on
// a clock where S10 is high, and hold them while the frame is sent. The
// demultiplexer routes the serial output Q[0] of the shift register to the
// line of that PC; the other three lines are held at 1, the RS-232 idle
// level. The structure (two flip-flops loaded by S10 feeding the dmux
// select) is the original's; the idle level of unselected lines and the
// clear by RSTG (the original ties the clears inactive) are this design's.
//
// Interface: clk, rst (RSTG), s10, q_dst ({Q[3], Q[2]}), q0 (serial data),
// pc_rx[3:0] (PC0RX..PC3RX). Timing: the select changes on the clock after
// S10; data passes combinationally.
module pc_demux (
  input  logic       clk,
  input  logic       rst,
  input  logic       s10,
  input  logic [1:0] q_dst,
  input  logic       q0,
  output logic [3:0] pc_rx
);
  logic [1:0] dst;

  always_ff @(posedge clk) begin
    if (rst)      dst <= '0;
    else if (s10) dst <= q_dst;
  end

  always_comb begin
    pc_rx      = '1;
    pc_rx[dst] = q0;
  end
endmodule
