// tx_pn: one transmit processing node (PN) of the transmit buffer.
//
// Holds one 7-bit message {value[3:0], address[2:0]} in a shift register and offers
// it to its bottom-level tree switch one bit at a time, bit 0 first. `valid` rises as
// soon as a message is written (it is not qualified by run). Each cycle in which the
// switch returns `taken` while `run` is high, the register rotates one place toward
// bit 0, bit 0 re-entering at bit 6, and the mod-7 counter advances. When the seventh
// bit is taken, `valid` falls in that same cycle unless `auto_mode` is set, in which
// case the message, now rotated back to its original order, is offered again.
//
// Interface: `bit_out`/`valid` forward, `taken` back; a bit counts as transferred in
// a cycle where valid and taken are both high, and both sides update at that clock
// edge. Reset clears the register, counter and valid. A write (`load`) restarts the
// counter and sets valid. The recirculating register, the counter, the valid latch
// set by the decoder and cleared at the last bit unless auto is set, and the shift
// being the AND of run and taken follow the chip; the single-clock timing is this
// design's rendering of the original two-phase latches.
module tx_pn
  import tbh_pkg::*;
(
  input  logic clk,
  input  logic rst,        // RESETINP: clears message, counter and valid
  input  logic load,       // decoder select and WriteIN: write `din`
  input  msg_t din,        // message from the DTIN_B pins
  input  logic run,        // RUNINP
  input  logic auto_mode,  // AUTOINP: requeue a message once it has been sent
  input  logic taken,      // switch has taken the current bit
  output logic bit_out,    // current bit (register bit 0)
  output logic valid       // a bit is ready
);

  logic [MSG_BITS-1:0] sreg;
  logic shift;
  logic last;
  cnt_t count;

  assign shift = run && taken && valid;

  mod7_cnt u_cnt (
    .clk   (clk),
    .rst   (rst),
    .clr   (load),
    .inc   (shift),
    .count (count),
    .last  (last)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      sreg  <= '0;
      valid <= 1'b0;
    end else if (load) begin
      sreg  <= din;
      valid <= 1'b1;
    end else if (shift) begin
      sreg <= {sreg[0], sreg[MSG_BITS-1:1]};
      if (last) valid <= auto_mode;
    end
  end

  assign bit_out = sreg[0];

endmodule
