// mod7_cnt: modulo-7 bit counter used by every bit-serial stage of the chip.
//
// Every stage that moves 7-bit messages one bit at a time (transmit PN, tree switch,
// receive buffer) keeps one of these to know where a message ends. The count runs
// 0,1,...,6 and wraps to 0 on the increment that follows 6; `last` is high while
// the count is 6, so `inc && last` marks the cycle in which the final bit of a
// message moves. `clr` restarts the count at 0 (a new message loaded) and takes
// precedence over `inc`; `rst` is the chip reset. Synchronous, one clock cycle per
// bit. The modulus is the 7-bit message length; the flop-level structure of the
// original counter is not reproduced, only its function.
module mod7_cnt
  import tbh_pkg::*;
(
  input  logic clk,
  input  logic rst,    // chip reset, synchronous, active high
  input  logic clr,    // restart at 0
  input  logic inc,    // one bit of the message has moved
  output cnt_t count,  // bits moved so far in this message
  output logic last    // count is 6: the next increment ends the message
);

  localparam cnt_t LAST = cnt_t'(MSG_BITS - 1);

  always_ff @(posedge clk) begin
    if (rst || clr)  count <= '0;
    else if (inc)    count <= (count == LAST) ? '0 : count + cnt_t'(1);
  end

  assign last = (count == LAST);

endmodule
