// ct_switch: one node of the concentrate tree.
//
// A switch has two children, the higher-address (H) and lower-address (L) one, and
// one parent. Each link carries a valid line, a data bit and a taken line going back.
// The switch moves one message (7 bits) at a time: when idle it chooses a child, then
// takes exactly 7 bits from that child, one per cycle at most, before choosing again.
//
// Choice (bandwidth-slice priority): the switch cycles through a phase that prefers H
// for N_HIGH messages and then a phase that prefers L for M_LOW messages. If the
// preferred child has no bit ready and the other has, the other child's message is
// taken; such a message does not advance the slice count, so the preference stays put.
// The switch starts after reset preferring H.
//
// Pipeline: one output register (bit + valid). A bit is taken from the granted child
// in any cycle where RUNINP is high, the child is valid and the output register is
// empty or being taken by the parent in that cycle, so a stream of bits passes at one
// bit per cycle with one cycle of latency per tree level. `htaken`/`ltaken` are
// combinational within the cycle, as is the dependence on `sbtaken`, so a stall at the
// root reaches the leaves in the same cycle. `sbitv` is qualified by RUNINP: when run
// falls the switch stops offering bits and stops taking them, holding what it has.
//
// Follows the chip: the H/L child naming, one message at a time, the n-high-then-m-low
// scheme with fall-back to the other child, the mod-7 end-of-message count, and the
// RUNINP qualification of the output valid and of the input load. This design's own:
// the single register stage per switch (the chip used an input latch and an output
// latch on alternate clock phases), and leaving the slice count unchanged on a
// fall-back message.
module ct_switch
  import tbh_pkg::*;
#(
  parameter int unsigned NH = N_HIGH,  // messages from H per slice cycle
  parameter int unsigned ML = M_LOW    // messages from L per slice cycle
) (
  input  logic clk,
  input  logic rst,       // RESETINP: back to the power-up state
  input  logic run,       // RUNINP
  // higher-address child
  input  logic hvalid,
  input  logic hbit,
  output logic htaken,
  // lower-address child
  input  logic lvalid,
  input  logic lbit,
  output logic ltaken,
  // parent
  output logic sbitv,
  output logic sbit,
  input  logic sbtaken
);

  localparam int unsigned SW = (NH > ML) ? $clog2(NH + 1) : $clog2(ML + 1);
  typedef logic [SW-1:0] slice_cnt_t;

  logic       busy;        // a message is being moved
  logic       grant_h;     // granted child while busy: 1 = H, 0 = L
  slice_e     pref;        // preferred child when the next message is chosen
  slice_cnt_t slice_cnt;   // messages taken so far in the current slice phase
  logic       out_v;       // output register holds a bit
  logic       last;        // the bit being taken is the message's seventh
  cnt_t       count;

  logic sel_h, sel_valid, sel_bit, load_in, out_free;

  // child selection: hold the grant while busy, otherwise apply the slice preference
  always_comb begin
    if (busy)                   sel_h = grant_h;
    else if (pref == SLICE_HIGH) sel_h = hvalid || !lvalid;
    else                        sel_h = hvalid && !lvalid;
    sel_valid = sel_h ? hvalid : lvalid;
    sel_bit   = sel_h ? hbit   : lbit;
  end

  assign out_free = !out_v || sbtaken;
  assign load_in  = run && sel_valid && out_free;
  assign htaken   = load_in && sel_h;
  assign ltaken   = load_in && !sel_h;
  assign sbitv    = out_v && run;

  mod7_cnt u_cnt (
    .clk   (clk),
    .rst   (rst),
    .clr   (1'b0),
    .inc   (load_in),
    .count (count),
    .last  (last)
  );

  // output register
  always_ff @(posedge clk) begin
    if (rst) begin
      out_v <= 1'b0;
      sbit  <= 1'b0;
    end else if (load_in) begin
      out_v <= 1'b1;
      sbit  <= sel_bit;
    end else if (sbtaken) begin
      out_v <= 1'b0;
    end
  end

  // grant and bandwidth-slice state
  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      grant_h   <= 1'b0;
      pref      <= SLICE_HIGH;
      slice_cnt <= '0;
    end else if (load_in) begin
      if (!busy) begin
        busy    <= 1'b1;
        grant_h <= sel_h;
        if (sel_h == (pref == SLICE_HIGH)) begin
          if (32'(slice_cnt) + 1 >= ((pref == SLICE_HIGH) ? NH : ML)) begin
            pref      <= (pref == SLICE_HIGH) ? SLICE_LOW : SLICE_HIGH;
            slice_cnt <= '0;
          end else begin
            slice_cnt <= slice_cnt + slice_cnt_t'(1);
          end
        end
      end else if (last) begin
        busy <= 1'b0;
      end
    end
  end

  // the parent only takes a bit that is offered
  a_taken_needs_valid: assert property (@(posedge clk) disable iff (rst) sbtaken |-> sbitv)
    else $error("ct_switch: taken without valid");
  // a child keeps its bit steady until it is taken (while the chip runs)
  a_hold_h: assert property (@(posedge clk) disable iff (rst)
      (run && hvalid && !htaken) ##1 run |-> hvalid && (hbit == $past(hbit)))
    else $error("ct_switch: H child dropped an untaken bit");
  a_hold_l: assert property (@(posedge clk) disable iff (rst)
      (run && lvalid && !ltaken) ##1 run |-> lvalid && (lbit == $past(lbit)))
    else $error("ct_switch: L child dropped an untaken bit");

endmodule
