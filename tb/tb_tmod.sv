// tb_tmod: self-checking test of the concentrate tree with its global receive line.
// Eight message sources stand in for the transmit PNs; a sink on the root link takes
// bits (always, or with random stalls). The expected order of messages at the root
// comes from a message-level model of the tree written here: every switch keeps a
// bandwidth-slice preference (H first, then L, one message each), takes the
// preferred child's next message if that subtree has one and the other child's
// otherwise. Checks: message contents and order (full load gives PN order 7,3,5,1,
// 6,2,4,0), one bit per cycle at the root once the first bit arrives three cycles
// after run (one per level), partial loads that exercise the fall-back, and the
// monitor taps.
module tb_tmod;
  import tbh_pkg::*;

  logic clk = 0, rst, run;
  logic [7:0] pn_valid, pn_bit, pn_taken;
  logic root_v, root_b, root_t;
  logic [6:0] mon_v, mon_b, mon_t;
  int checks = 0, failures = 0;
  int stall_pct = 0;

  tmod dut (.clk, .rst, .run, .pn_valid, .pn_bit, .pn_taken, .root_v, .root_b, .root_t,
            .mon_v, .mon_b, .mon_t);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- transmit PN stand-ins ----
  logic [6:0] pq [8][$];
  int ppos [8];
  for (genvar i = 0; i < 8; i++) begin : g_src
    assign pn_valid[i] = pq[i].size() > 0;
    assign pn_bit[i]   = pn_valid[i] ? pq[i][0][ppos[i]] : 1'b0;
    always @(posedge clk) begin
      if (rst) ppos[i] <= 0;
      else if (pn_taken[i]) begin
        if (ppos[i] == 6) begin ppos[i] <= 0; void'(pq[i].pop_front()); end
        else ppos[i] <= ppos[i] + 1;
      end
    end
  end

  // ---- root sink ----
  logic [6:0] rx [$];
  logic [6:0] sh;
  int nbit, root_bits, first_cycle, last_cycle, cyc;
  always @(negedge clk) root_t = root_v && ($urandom_range(0, 99) >= stall_pct);
  always @(posedge clk) begin
    if (rst) begin
      nbit = 0; root_bits = 0; cyc = 0; first_cycle = -1; last_cycle = -1;
    end else begin
      if (run) cyc++;
      if (root_t) begin
        if (first_cycle < 0) first_cycle = cyc;
        last_cycle = cyc;
        root_bits++;
        sh[nbit] = root_b;
        nbit++;
        if (nbit == 7) begin rx.push_back(sh); nbit = 0; end
      end
      // monitor taps mirror the root link
      if (mon_v[6] != root_v || mon_t[6] != root_t || (root_v && mon_b[6] != root_b)) begin
        failures++;
        $display("FAIL root monitor taps");
      end
    end
  end

  // ---- message-level reference model ----
  int mq [8][$];   // remaining message counts per PN, as ids
  bit mpref [7];   // 0: prefer H, 1: prefer L
  function automatic int subtree_count(int node);  // node 0..6 switch
    if (node < 4) return mq[2*node].size() + mq[2*node+1].size();
    else if (node == 4) return subtree_count(0) + subtree_count(1);
    else if (node == 5) return subtree_count(2) + subtree_count(3);
    else return subtree_count(4) + subtree_count(5);
  endfunction
  function automatic int next_pn(int node);  // which PN the node's next message is from
    int hc, lc;  // child ids: PN index for node < 4, switch index otherwise
    bit h_av, l_av, take_h;
    if (node < 4) begin
      hc = 2*node + 1; lc = 2*node;
      h_av = mq[hc].size() > 0; l_av = mq[lc].size() > 0;
    end else begin
      hc = (node == 6) ? 5 : 2*(node-4) + 1; lc = hc - 1;
      h_av = subtree_count(hc) > 0; l_av = subtree_count(lc) > 0;
    end
    take_h = (mpref[node] == 0) ? h_av : !l_av;
    if (take_h == (mpref[node] == 0)) mpref[node] = !mpref[node];  // preferred child served
    if (node < 4) begin
      int p = take_h ? hc : lc;
      void'(mq[p].pop_front());
      return p;
    end
    return next_pn(take_h ? hc : lc);
  endfunction

  logic [6:0] sent [8][$];  // the messages each PN sends, in order
  int exp_pn [$];           // source PN of each expected message

  task automatic run_case(input bit [7:0] loaded, input int per_pn, input int stall);
    logic [6:0] exp [$];
    int total;
    rst = 1; run = 0; stall_pct = stall;
    rx.delete();
    exp_pn.delete();
    for (int i = 0; i < 8; i++) begin pq[i].delete(); mq[i].delete(); sent[i].delete(); end
    for (int i = 0; i < 7; i++) mpref[i] = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    total = 0;
    for (int i = 0; i < 8; i++)
      if (loaded[i])
        for (int k = 0; k < per_pn; k++) begin
          logic [6:0] m;
          m = 7'($urandom);
          pq[i].push_back(m); sent[i].push_back(m); mq[i].push_back(k);
          total++;
        end
    for (int n = 0; n < total; n++) begin
      int p;
      p = next_pn(6);
      exp_pn.push_back(p);
      exp.push_back(sent[p].pop_front());
    end
    run = 1;
    for (int t = 0; t < 20 * total * 7 + 50 && rx.size() < total; t++) @(negedge clk);
    check(rx.size() == total, $sformatf("delivered %0d of %0d", rx.size(), total));
    for (int n = 0; n < total && n < rx.size(); n++)
      check(rx[n] == exp[n], $sformatf("case %b: message %0d is %h, expected %h", loaded, n, rx[n], exp[n]));
    if (stall == 0 && total > 0) begin
      check(first_cycle == 4, $sformatf("first bit at the root in cycle 4 of run (got %0d)", first_cycle));
      check(last_cycle - first_cycle + 1 == 7 * total,
            $sformatf("one bit per cycle at the root: %0d bits in %0d cycles", 7 * total, last_cycle - first_cycle + 1));
    end
    run = 0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // full load, one message each: PN order 7,3,5,1,6,2,4,0
    run_case(8'hff, 1, 0);
    check(exp_pn.size() == 8 && exp_pn[0] == 7 && exp_pn[1] == 3 && exp_pn[2] == 5 && exp_pn[3] == 1 &&
          exp_pn[4] == 6 && exp_pn[5] == 2 && exp_pn[6] == 4 && exp_pn[7] == 0,
          "full load order 7,3,5,1,6,2,4,0");
    run_case(8'hff, 4, 0);
    run_case(8'hff, 3, 35);
    for (int r = 0; r < 12; r++) run_case(8'($urandom), 1 + r % 3, (r % 2) ? 30 : 0);
    run_case(8'h01, 2, 0);
    run_case(8'h81, 2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
