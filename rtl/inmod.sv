// inmod: transmit PN buffer, the message source side of the chip.
//
// Eight transmit PNs (tx_pn) form a write-only register file. A 3-bit decoder turns
// the ATIN_B address into one write select, enabled by WriteIN, so one register is
// written per clock cycle from the 7 DTIN_B pins (bits 2:0 destination address, bits
// 6:3 value). Each PN then presents its message bit-serially on bit_out[i]/valid[i]
// and advances on taken[i]. PNs 2k and 2k+1 attach to bottom switch k, 2k+1 being that
// switch's higher-address child. All PN outputs are registered; taken[i] may depend
// combinationally on valid[i] within a cycle.
//
// The chip requires WriteIN and RUNINP never to be high together, and WriteIN to fall
// before the write address changes; assertions check both. The register file, decoder and write protocol follow the chip; the packed-vector
// port layout is this design's choice.
module inmod
  import tbh_pkg::*;
#(
  parameter int unsigned N = NUM_PN  // number of transmit PNs
) (
  input  logic                 clk,
  input  logic                 rst,        // RESETINP
  input  logic                 write_in,   // WriteIN
  input  logic [$clog2(N)-1:0] atin,       // ATIN_B: PN to write
  input  msg_t                 dtin,       // DTIN_B: {value, destination}
  input  logic                 run,        // RUNINP
  input  logic                 auto_mode,  // AUTOINP
  input  logic [N-1:0]         taken,      // Taken_2.x from the bottom switches
  output logic [N-1:0]         bit_out,    // Bit.x
  output logic [N-1:0]         valid       // Valid_1.x
);

  logic [N-1:0] sel;

  // address decoder: one-hot write select, enabled by WriteIN
  always_comb begin
    sel = '0;
    if (write_in) sel[atin] = 1'b1;
  end

  for (genvar i = 0; i < N; i++) begin : g_pn
    tx_pn u_pn (
      .clk       (clk),
      .rst       (rst),
      .load      (sel[i]),
      .din       (dtin),
      .run       (run),
      .auto_mode (auto_mode),
      .taken     (taken[i]),
      .bit_out   (bit_out[i]),
      .valid     (valid[i])
    );
  end

  a_write_run_exclusive: assert property (@(posedge clk) disable iff (rst) !(write_in && run))
    else $error("inmod: WriteIN and RUNINP high in the same cycle");
  // WriteIN must fall before the write address changes
  a_write_addr_stable: assert property (@(posedge clk) disable iff (rst)
      write_in && $past(write_in) |-> atin == $past(atin))
    else $error("inmod: ATIN_B changed while WriteIN stayed high");

endmodule
