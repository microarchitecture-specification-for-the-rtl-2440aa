// outmod: receive PN buffer at the end of the global receive line.
//
// Eight 4-bit receive registers, a 3-bit address shift register and a mod-7 bit
// counter. The buffer always accepts: `taken` is high in every cycle in which the
// root switch offers a bit while RUNINP is high. The first 3 bits of a message
// (count 0-2) shift into the address register, entering at bit 2 so that after three
// bits it holds the destination address in its original order; its contents are the
// ADRB pins. The next 4 bits (count 3-6) shift, also from the top, into the receive
// register that the address selects, which then holds the 4-bit value in its original
// order. The counter wraps to 0 after the seventh bit, ready for the next message.
//
// Read port: the ARIN_B address is decoded combinationally. While ReadIN is high,
// DROUT shows the selected register and RRdyOUT says whether it holds a completely
// received value that is not being overwritten in this message; while ReadIN is low
// both are 0. Reset clears every register.
//
// Follows the chip: always-taken handshake, address-then-value split at count 3,
// serial shift into the selected register, combinational read decode. This design's
// own: the per-register "received" flag behind RRdyOUT and zeroing DROUT outside reads.
module outmod
  import tbh_pkg::*;
#(
  parameter int unsigned N = NUM_PN  // receive PNs
) (
  input  logic                 clk,
  input  logic                 rst,      // RESETINP
  input  logic                 run,      // RUNINP
  // global receive line
  input  logic                 sbitv,    // s6v
  input  logic                 sbit,     // s6b
  output logic                 btaken,   // s6t
  // pins
  input  logic [$clog2(N)-1:0] arin,     // ARIN_B: register to read
  input  logic                 read_in,  // ReadIN
  output value_t               drout,    // DROUT_B
  output logic                 rrdy,     // RRdyOUT
  output logic [$clog2(N)-1:0] adrb      // ADRB: address shift register
);

  localparam int unsigned AW = $clog2(N);

  value_t       rx_reg [N];  // receive PN registers
  logic [N-1:0] rx_full;     // register holds a completely received value
  cnt_t         count;
  logic         last;
  logic         addr_phase;  // counts 0-2: the bit is an address bit

  assign btaken     = sbitv && run;
  assign addr_phase = (count < cnt_t'(ADDR_BITS));

  mod7_cnt u_cnt (
    .clk   (clk),
    .rst   (rst),
    .clr   (1'b0),
    .inc   (btaken),
    .count (count),
    .last  (last)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      adrb    <= '0;
      rx_full <= '0;
      for (int i = 0; i < int'(N); i++) rx_reg[i] <= '0;
    end else if (btaken) begin
      if (addr_phase) begin
        adrb <= {sbit, adrb[AW-1:1]};
      end else begin
        rx_reg[adrb] <= {sbit, rx_reg[adrb][VALUE_BITS-1:1]};
        rx_full[adrb] <= last;
      end
    end
  end

  always_comb begin
    drout = '0;
    rrdy  = 1'b0;
    if (read_in) begin
      drout = rx_reg[arin];
      rrdy  = rx_full[arin];
    end
  end

endmodule
