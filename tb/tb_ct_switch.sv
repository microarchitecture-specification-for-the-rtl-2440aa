// tb_ct_switch: self-checking test of one concentrate tree switch.
// Two message sources stand in for the H and L children and a sink for the parent.
// The sink collects the output stream in 7-bit messages and checks each against the
// message the bandwidth-slice rule says must come next:
//   1. both children always loaded, sink always ready: H,L,H,L,... with no idle cycle
//      between bits (one bit per cycle), first bit out one cycle after it is offered;
//   2. the same with random parent stalls;
//   3. only L loaded: L messages pass (fall-back); then both loaded: H goes first,
//      since fall-back messages leave the preference alone;
//   4. run low: no bit moves and the output valid is low;
//   5. a second switch with 2 high / 1 low messages per slice cycle gives H,H,L,...
module tb_ct_switch;
  import tbh_pkg::*;

  logic clk = 0, rst, run;
  int checks = 0, failures = 0;
  int stall_pct;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always #5 clk = ~clk;

  // ---- the two switches under test share the child sources' structure ----
  // index 0: default (1 high, 1 low); index 1: 2 high, 1 low
  logic [1:0] hvalid, hbit, htaken, lvalid, lbit, ltaken, sbitv, sbit, sbtaken;

  ct_switch dut0 (.clk, .rst, .run,
    .hvalid(hvalid[0]), .hbit(hbit[0]), .htaken(htaken[0]),
    .lvalid(lvalid[0]), .lbit(lbit[0]), .ltaken(ltaken[0]),
    .sbitv(sbitv[0]), .sbit(sbit[0]), .sbtaken(sbtaken[0]));

  ct_switch #(.NH(2), .ML(1)) dut1 (.clk, .rst, .run,
    .hvalid(hvalid[1]), .hbit(hbit[1]), .htaken(htaken[1]),
    .lvalid(lvalid[1]), .lbit(lbit[1]), .ltaken(ltaken[1]),
    .sbitv(sbitv[1]), .sbit(sbit[1]), .sbtaken(sbtaken[1]));

  // child sources: queues of 7-bit messages, sent bit 0 first
  logic [6:0] hq [2][$];
  logic [6:0] lq [2][$];
  int hpos [2], lpos [2];

  for (genvar d = 0; d < 2; d++) begin : g_src
    assign hvalid[d] = hq[d].size() > 0;
    assign lvalid[d] = lq[d].size() > 0;
    assign hbit[d]   = hvalid[d] ? hq[d][0][hpos[d]] : 1'b0;
    assign lbit[d]   = lvalid[d] ? lq[d][0][lpos[d]] : 1'b0;
    always @(posedge clk) begin
      if (rst) begin
        hpos[d] <= 0;
        lpos[d] <= 0;
      end else begin
        if (htaken[d]) begin
          if (hpos[d] == 6) begin hpos[d] <= 0; void'(hq[d].pop_front()); end
          else hpos[d] <= hpos[d] + 1;
        end
        if (ltaken[d]) begin
          if (lpos[d] == 6) begin lpos[d] <= 0; void'(lq[d].pop_front()); end
          else lpos[d] <= lpos[d] + 1;
        end
      end
    end
  end

  // parent sink: random stalls, collects bits into messages
  logic [6:0] rx_msgs [2][$];
  logic [6:0] rx_sh [2];
  int rx_n [2];
  int out_cycles [2];  // cycles with valid output, to check the bit rate

  for (genvar d = 0; d < 2; d++) begin : g_sink
    always @(negedge clk) sbtaken[d] = sbitv[d] && ($urandom_range(0, 99) >= stall_pct);
    always @(posedge clk) begin
      if (rst) begin
        rx_n[d] = 0;
        out_cycles[d] = 0;
      end else begin
        if (sbitv[d]) out_cycles[d]++;
        if (sbtaken[d]) begin
          rx_sh[d][rx_n[d]] = sbit[d];
          rx_n[d]++;
          if (rx_n[d] == 7) begin
            rx_msgs[d].push_back(rx_sh[d]);
            rx_n[d] = 0;
          end
        end
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // message tag: bit 6 = 1 for H, id in bits 5:0
  function automatic logic [6:0] hmsg(int id); return {1'b1, 6'(id)}; endfunction
  function automatic logic [6:0] lmsg(int id); return {1'b0, 6'(id)}; endfunction

  task automatic do_reset();
    rst = 1; run = 0;
    for (int d = 0; d < 2; d++) begin
      hq[d].delete(); lq[d].delete(); rx_msgs[d].delete();
    end
    @(negedge clk); @(negedge clk);
    rst = 0;
  endtask

  task automatic wait_msgs(int d, int n);
    int t = 0;
    while (rx_msgs[d].size() < n && t < 5000) begin @(negedge clk); t++; end
    check(rx_msgs[d].size() == n, $sformatf("switch %0d delivered %0d of %0d", d, rx_msgs[d].size(), n));
  endtask

  initial begin
    logic [6:0] exp;
    int first_out;
    stall_pct = 0;
    // ---- 1: full load, no stalls, exact timing ----
    do_reset();
    for (int i = 0; i < 6; i++) begin hq[0].push_back(hmsg(i)); lq[0].push_back(lmsg(i)); end
    for (int i = 0; i < 8; i++) begin hq[1].push_back(hmsg(i)); lq[1].push_back(lmsg(i)); end
    run = 1;
    @(negedge clk);
    check(sbitv[0], "first bit out one cycle after run");
    wait_msgs(0, 12);
    check(out_cycles[0] == 84, $sformatf("12 messages in 84 valid cycles (got %0d)", out_cycles[0]));
    for (int i = 0; i < 12; i++) begin
      exp = (i % 2 == 0) ? hmsg(i / 2) : lmsg(i / 2);
      check(rx_msgs[0][i] == exp, $sformatf("slice 1/1 order, message %0d: %h vs %h", i, rx_msgs[0][i], exp));
    end
    wait_msgs(1, 16);
    // 2 high, 1 low: H0 H1 L0 H2 H3 L1 H4 H5 L2 H6 H7 L3 then only L left
    begin
      logic [6:0] e1 [16] = '{hmsg(0), hmsg(1), lmsg(0), hmsg(2), hmsg(3), lmsg(1),
                              hmsg(4), hmsg(5), lmsg(2), hmsg(6), hmsg(7), lmsg(3),
                              lmsg(4), lmsg(5), lmsg(6), lmsg(7)};
      for (int i = 0; i < 16; i++)
        check(rx_msgs[1][i] == e1[i], $sformatf("slice 2/1 order, message %0d", i));
    end
    // ---- 2: full load with random parent stalls ----
    do_reset();
    stall_pct = 40;
    for (int i = 0; i < 10; i++) begin hq[0].push_back(hmsg(i)); lq[0].push_back(lmsg(i)); end
    run = 1;
    wait_msgs(0, 20);
    for (int i = 0; i < 20; i++) begin
      exp = (i % 2 == 0) ? hmsg(i / 2) : lmsg(i / 2);
      check(rx_msgs[0][i] == exp, $sformatf("stalled order, message %0d", i));
    end
    stall_pct = 0;
    // ---- 3: fall-back to L, preference kept ----
    do_reset();
    for (int i = 0; i < 3; i++) lq[0].push_back(lmsg(i));
    run = 1;
    wait_msgs(0, 3);
    for (int i = 0; i < 3; i++) check(rx_msgs[0][i] == lmsg(i), "fall-back to L");
    run = 0;
    @(negedge clk);
    lq[0].push_back(lmsg(3)); lq[0].push_back(lmsg(4));
    hq[0].push_back(hmsg(0)); hq[0].push_back(hmsg(1));
    @(negedge clk);
    // ---- 4: run low holds everything ----
    check(!sbitv[0] && !htaken[0] && !ltaken[0], "run low: nothing offered or taken");
    run = 1;
    wait_msgs(0, 7);
    check(rx_msgs[0][3] == hmsg(0), "H first after fall-back");
    check(rx_msgs[0][4] == lmsg(3), "then L");
    check(rx_msgs[0][5] == hmsg(1), "then H");
    check(rx_msgs[0][6] == lmsg(4), "then L again");
    // run dropped in the middle of a message, then resumed
    do_reset();
    hq[0].push_back(hmsg(9));
    run = 1;
    repeat (3) @(negedge clk);
    run = 0;
    repeat (5) begin
      @(negedge clk);
      check(!sbitv[0] && !htaken[0], "halted mid-message");
    end
    run = 1;
    wait_msgs(0, 1);
    check(rx_msgs[0][0] == hmsg(9), "message intact across a halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
