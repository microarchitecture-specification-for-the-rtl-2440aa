// tbh_pkg: constants and types shared by the broadcast hierarchy test chip.
//
// A message is 7 bits: the low 3 bits are the destination receive PN address and
// the high 4 bits are the value. Messages travel least significant bit first, so a
// receiver sees the 3 address bits before the 4 value bits. The bandwidth-slice
// weights (N_HIGH messages from the higher-address child, then M_LOW from the lower)
// are 1 and 1 on the chip. The slice-phase type below is this design's own encoding.
package tbh_pkg;

  localparam int unsigned ADDR_BITS  = 3;                       // receive PN address
  localparam int unsigned VALUE_BITS = 4;                       // message payload
  localparam int unsigned MSG_BITS   = ADDR_BITS + VALUE_BITS;  // 7 bits per message
  localparam int unsigned NUM_PN     = 1 << ADDR_BITS;          // 8 transmit, 8 receive PNs
  localparam int unsigned CNT_BITS   = 3;                       // mod-7 bit counter width

  localparam int unsigned N_HIGH = 1;  // messages taken from the higher-address child
  localparam int unsigned M_LOW  = 1;  // messages then taken from the lower-address child

  typedef logic [ADDR_BITS-1:0]  addr_t;
  typedef logic [VALUE_BITS-1:0] value_t;
  typedef logic [CNT_BITS-1:0]   cnt_t;

  // A transmit message as loaded from the pins: {value, address}.
  typedef struct packed {
    value_t value;
    addr_t  addr;
  } msg_t;

  // Which child a switch currently prefers in its bandwidth-slice cycle.
  typedef enum logic {
    SLICE_HIGH = 1'b0,
    SLICE_LOW  = 1'b1
  } slice_e;

endpackage
