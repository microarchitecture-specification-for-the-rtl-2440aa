// tmod: interconnect structure, the concentrate tree plus the global receive line.
//
// N transmit PNs feed a binary tree of N-1 ct_switch nodes. Switches are numbered
// level by level from the bottom: for N = 8, switches 0-3 form the first level
// (switch k serves PNs 2k and 2k+1), 4 and 5 the second (4 serves switches 0 and 1,
// 5 serves 2 and 3) and 6 is the root. In every pair the higher-numbered source is
// the switch's higher-address (H) child. The root's output is the global receive line
// (s6v, s6b, with s6t returned by the receivers).
//
// Every link uses the same valid/bit/taken handshake; a bit moves when valid and
// taken are both high in a cycle. The taken lines are combinational from the root
// down, so the tree passes one bit per cycle end to end with one cycle of latency per
// level (3 cycles for N = 8). The monitor outputs carry each switch's output valid,
// bit and the taken line from its parent (the SxVP, SxBP, SxTP pins).
//
// Tree shape, switch numbering and H/L assignment follow the chip. N is a parameter
// here (a power of two); the chip has N = 8.
module tmod
  import tbh_pkg::*;
#(
  parameter int unsigned N = NUM_PN  // transmit PNs, a power of two >= 2
) (
  input  logic         clk,
  input  logic         rst,       // RESETINP
  input  logic         run,       // RUNINP
  // from / to the transmit PNs
  input  logic [N-1:0] pn_valid,  // Valid_1.x
  input  logic [N-1:0] pn_bit,    // Bit.x
  output logic [N-1:0] pn_taken,  // Taken_2.x
  // global receive line
  output logic         root_v,    // s6v
  output logic         root_b,    // s6b
  input  logic         root_t,    // s6t
  // monitor taps, one per switch address
  output logic [N-2:0] mon_v,     // SxVP
  output logic [N-2:0] mon_b,     // SxBP
  output logic [N-2:0] mon_t      // SxTP
);

  localparam int unsigned LEVELS = $clog2(N);
  localparam int unsigned NS     = N - 1;

  // index of the first switch on a level (levels count from 1 at the bottom)
  function automatic int unsigned level_base(int unsigned level);
    int unsigned b = 0;
    for (int unsigned l = 1; l < level; l++) b += N >> l;
    return b;
  endfunction

  logic [NS-1:0] sv, sb, st;  // switch outputs and the taken line from each parent

  for (genvar lv = 1; lv <= LEVELS; lv++) begin : g_level
    for (genvar k = 0; k < (N >> lv); k++) begin : g_sw
      localparam int unsigned IDX = level_base(lv) + k;
      logic hv, hb, ht, lvv, lb, lt;

      if (lv == 1) begin : g_leaf
        assign hv = pn_valid[2*k+1];
        assign hb = pn_bit[2*k+1];
        assign lvv = pn_valid[2*k];
        assign lb = pn_bit[2*k];
        assign pn_taken[2*k+1] = ht;
        assign pn_taken[2*k]   = lt;
      end else begin : g_inner
        localparam int unsigned CB = level_base(lv - 1) + 2 * k;  // low child switch
        assign hv = sv[CB+1];
        assign hb = sb[CB+1];
        assign lvv = sv[CB];
        assign lb = sb[CB];
        assign st[CB+1] = ht;
        assign st[CB]   = lt;
      end

      ct_switch u_sw (
        .clk     (clk),
        .rst     (rst),
        .run     (run),
        .hvalid  (hv),
        .hbit    (hb),
        .htaken  (ht),
        .lvalid  (lvv),
        .lbit    (lb),
        .ltaken  (lt),
        .sbitv   (sv[IDX]),
        .sbit    (sb[IDX]),
        .sbtaken (st[IDX])
      );
    end
  end

  assign st[NS-1] = root_t;
  assign root_v   = sv[NS-1];
  assign root_b   = sb[NS-1];
  assign mon_v    = sv;
  assign mon_b    = sb;
  assign mon_t    = st;

endmodule
