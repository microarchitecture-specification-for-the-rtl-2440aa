// tbh_chip: broadcast hierarchy test chip, one physical broadcast domain.
//
// Eight transmit PNs (inmod) send 7-bit messages {value[3:0], address[2:0]} up a
// three-level binary concentrate tree of seven switches (tmod); the root switch drives
// a single global receive line into eight receive PNs (outmod), where the message's
// address bits select the register that captures its value. Only one message crosses
// the root at a time; the tree decides which, with a bandwidth-slice priority at every
// switch (alternately one message from the higher-address child, one from the lower).
//
// Operation: assert RESETINP for at least one cycle; write the transmit PNs one per
// cycle (WRITEINP with ATIN_B and DTIN_B); raise RUNINP to let the messages flow, one
// bit per cycle through the tree, watching the SxVP/SxBP/SxTP taps and ADRB; then
// read the receive PNs with READINP and ARIN_B. With AUTOINP high every message is
// requeued as soon as it has been sent, so the tree runs continuously under full load.
// WRITEINP and RUNINP must not be high in the same cycle.
//
// One cycle of `clk` stands for one cycle of the chip's non-overlapping two-phase
// clock (PH01, PH02); all inputs are sampled at the rising edge and RESETINP is
// synchronous and overrides everything. Block structure, pins and message format
// follow the chip; the single-clock timing is this design's own rendering. Pin buses
// are numbered with bit 0 as the least significant bit.
module tbh_chip
  import tbh_pkg::*;
(
  input  logic                 clk,        // PH01/PH02 cycle
  input  logic                 resetinp,   // RESETINP
  input  logic                 runinp,     // RUNINP
  input  logic                 autoinp,    // AUTOINP
  // transmit PN load
  input  logic                 writeinp,   // WRITEINP
  input  logic [ADDR_BITS-1:0] atin_b,     // ATIN_B: transmit PN to write
  input  logic [MSG_BITS-1:0]  dtin_b,     // DTIN_B: [6:3] value, [2:0] destination
  // receive PN read
  input  logic                 readinp,    // READINP
  input  logic [ADDR_BITS-1:0] arin_b,     // ARIN_B: receive PN to read
  output logic [VALUE_BITS-1:0] dr,        // DR: value read
  output logic                 rrdyp,      // RRDYP: that receive PN holds a value
  // monitor
  output logic [ADDR_BITS-1:0] adrb,       // ADRB: address being received
  output logic [NUM_PN-2:0]    s_vp,       // SxVP: switch x output valid
  output logic [NUM_PN-2:0]    s_bp,       // SxBP: switch x output bit
  output logic [NUM_PN-2:0]    s_tp        // SxTP: switch x output taken
);

  logic [NUM_PN-1:0] pn_valid, pn_bit, pn_taken;
  logic root_v, root_b, root_t;

  inmod #(.N(NUM_PN)) u_inmod (
    .clk       (clk),
    .rst       (resetinp),
    .write_in  (writeinp),
    .atin      (atin_b),
    .dtin      (msg_t'(dtin_b)),
    .run       (runinp),
    .auto_mode (autoinp),
    .taken     (pn_taken),
    .bit_out   (pn_bit),
    .valid     (pn_valid)
  );

  tmod #(.N(NUM_PN)) u_tmod (
    .clk      (clk),
    .rst      (resetinp),
    .run      (runinp),
    .pn_valid (pn_valid),
    .pn_bit   (pn_bit),
    .pn_taken (pn_taken),
    .root_v   (root_v),
    .root_b   (root_b),
    .root_t   (root_t),
    .mon_v    (s_vp),
    .mon_b    (s_bp),
    .mon_t    (s_tp)
  );

  outmod #(.N(NUM_PN)) u_outmod (
    .clk     (clk),
    .rst     (resetinp),
    .run     (runinp),
    .sbitv   (root_v),
    .sbit    (root_b),
    .btaken  (root_t),
    .arin    (arin_b),
    .read_in (readinp),
    .drout   (dr),
    .rrdy    (rrdyp),
    .adrb    (adrb)
  );

endmodule
