// tb_tbh_chip: end-to-end test of the broadcast hierarchy test chip through its pins.
// Runs the chip's operating sequence (reset, load the transmit PNs, run, read the
// receive PNs) several times and checks the results against a message-level model of
// the concentrate tree kept here (bandwidth slice of one high-address message, then
// one low-address message, at every switch, with fall-back to the other child).
//   - full load: eight messages arrive in PN order 7,3,5,1,6,2,4,0, the first bit at
//     the root in run cycle 4 and then one bit per cycle (59 cycles in all);
//   - ADRB shows each message's destination once its third bit is in;
//   - the receive PNs hold the value of the last message sent to them, RRDYP marks
//     exactly the PNs that received one;
//   - partial loads exercise the fall-back; RUNINP dropped in mid-message halts all
//     switch outputs and the run resumes without loss; AUTOINP repeats the same
//     message sequence; RESETINP in mid-run aborts and clears everything.
// Each of these mechanisms is counted and a mechanism that never happened is a failure.
// The chip is used at its default (and only) size.
module tb_tbh_chip;
  import tbh_pkg::*;

  logic clk = 0;
  logic resetinp, runinp, autoinp, writeinp, readinp, rrdyp;
  logic [2:0] atin_b, arin_b, adrb;
  logic [6:0] dtin_b, s_vp, s_bp, s_tp;
  logic [3:0] dr;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_slice_alternations = 0;  // a switch served H then L or L then H under load
  int n_fallbacks = 0;           // preferred child empty, the other child served
  int n_stall_cycles = 0;        // a switch output offered a bit that was not taken
  int n_run_halts = 0;           // RUNINP dropped in mid-message and resumed
  int n_auto_requeues = 0;       // messages delivered again in auto mode
  int n_reset_aborts = 0;        // reset during a run
  int n_not_ready_reads = 0;     // reads of a receive PN with RRDYP low

  tbh_chip dut (.clk, .resetinp, .runinp, .autoinp, .writeinp, .atin_b, .dtin_b,
                .readinp, .arin_b, .dr, .rrdyp, .adrb, .s_vp, .s_bp, .s_tp);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- observer on the root link (switch 6 taps) ----
  int root_bits, cyc, first_cycle, last_cycle, root_msgs;
  logic [6:0] sh;
  logic [6:0] rx [$];
  always @(posedge clk) begin
    if (resetinp) begin
      root_bits = 0; cyc = 0; first_cycle = -1; last_cycle = -1; root_msgs = 0;
    end else begin
      if (runinp) cyc++;
      for (int s = 0; s < 7; s++) if (runinp && s_vp[s] && !s_tp[s]) n_stall_cycles++;
      if (s_tp[6]) begin
        if (!s_vp[6]) begin failures++; $display("FAIL root taken without valid"); end
        if (first_cycle < 0) first_cycle = cyc;
        last_cycle = cyc;
        sh[root_bits % 7] = s_bp[6];
        root_bits++;
        if (root_bits % 7 == 0) begin rx.push_back(sh); root_msgs++; end
      end
    end
  end
  // ADRB after the third bit of each message
  int last_adrb_check = -1;
  always @(negedge clk) begin
    if (!resetinp && root_bits % 7 == 3 && root_bits != last_adrb_check) begin
      last_adrb_check = root_bits;
      checks++;
      if (adrb != sh[2:0]) begin
        failures++;
        $display("FAIL ADRB %0d, expected %0d", adrb, sh[2:0]);
      end
    end
  end

  // ---- message-level reference model of the tree ----
  int mq [8][$];
  bit mpref [7];  // 0: prefer H
  function automatic int subtree_count(int node);
    if (node < 4) return mq[2*node].size() + mq[2*node+1].size();
    else if (node == 4) return subtree_count(0) + subtree_count(1);
    else if (node == 5) return subtree_count(2) + subtree_count(3);
    else return subtree_count(4) + subtree_count(5);
  endfunction
  function automatic int next_pn(int node);
    int hc, lc;
    bit h_av, l_av, take_h;
    if (node < 4) begin
      hc = 2*node + 1; lc = 2*node;
      h_av = mq[hc].size() > 0; l_av = mq[lc].size() > 0;
    end else begin
      hc = (node == 6) ? 5 : 2*(node-4) + 1; lc = hc - 1;
      h_av = subtree_count(hc) > 0; l_av = subtree_count(lc) > 0;
    end
    take_h = (mpref[node] == 0) ? h_av : !l_av;
    if (take_h == (mpref[node] == 0)) begin
      mpref[node] = !mpref[node];
      if (h_av && l_av) n_slice_alternations++;
    end else begin
      n_fallbacks++;
    end
    if (node < 4) begin
      void'(mq[take_h ? hc : lc].pop_front());
      return take_h ? hc : lc;
    end
    return next_pn(take_h ? hc : lc);
  endfunction

  // ---- pin-level operations ----
  logic [6:0] loaded [8];
  bit         is_loaded [8];

  task automatic chip_reset();
    resetinp = 1; runinp = 0; autoinp = 0; writeinp = 0; readinp = 0;
    @(negedge clk); @(negedge clk);
    resetinp = 0;
    rx.delete();
    for (int i = 0; i < 8; i++) begin is_loaded[i] = 0; mq[i].delete(); end
    for (int i = 0; i < 7; i++) mpref[i] = 0;
  endtask

  task automatic write_pn(input int a, input logic [6:0] m);
    atin_b = 3'(a); dtin_b = m; writeinp = 1;
    @(negedge clk);
    writeinp = 0;
    @(negedge clk);  // idle cycle before the next write or run
    loaded[a] = m; is_loaded[a] = 1; mq[a].push_back(0);
  endtask

  // expected delivery order for what is loaded, as messages
  task automatic expected(output logic [6:0] e [$]);
    int total = 0;
    e.delete();
    for (int i = 0; i < 8; i++) total += mq[i].size();
    for (int n = 0; n < total; n++) e.push_back(loaded[next_pn(6)]);
  endtask

  task automatic read_and_check(input logic [6:0] e [$]);
    logic [3:0] val [8];
    bit full [8];
    for (int a = 0; a < 8; a++) begin val[a] = '0; full[a] = 0; end
    foreach (e[n]) begin val[e[n][2:0]] = e[n][6:3]; full[e[n][2:0]] = 1; end
    for (int a = 0; a < 8; a++) begin
      arin_b = 3'(a); readinp = 1;
      @(negedge clk);
      check(dr == val[a], $sformatf("receive PN %0d holds %h, expected %h", a, dr, val[a]));
      check(rrdyp == full[a], $sformatf("RRDYP of receive PN %0d", a));
      if (!rrdyp) n_not_ready_reads++;
      readinp = 0;
    end
  endtask

  task automatic run_until(input int nmsgs, input int limit);
    runinp = 1;
    for (int t = 0; t < limit && root_msgs < nmsgs; t++) @(negedge clk);
    @(negedge clk);
    runinp = 0;
    @(negedge clk);
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] e [$];
    logic [6:0] none [$];
    int perm [8];
    atin_b = '0; dtin_b = '0; arin_b = '0;

    // ---- 1: full load, each PN to a distinct receive PN ----
    chip_reset();
    for (int i = 0; i < 8; i++) perm[i] = i;
    for (int i = 7; i > 0; i--) begin
      int j, t;
      j = $urandom_range(0, i);
      t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    for (int i = 0; i < 8; i++) write_pn(i, {4'($urandom), 3'(perm[i])});
    expected(e);
    check(e[0] == loaded[7] && e[1] == loaded[3] && e[2] == loaded[5] && e[3] == loaded[1] &&
          e[4] == loaded[6] && e[5] == loaded[2] && e[6] == loaded[4] && e[7] == loaded[0],
          "model gives order 7,3,5,1,6,2,4,0");
    run_until(8, 200);
    check(rx.size() == 8, "eight messages delivered");
    foreach (rx[n]) check(rx[n] == e[n], $sformatf("full load message %0d", n));
    check(first_cycle == 4, $sformatf("first bit at the root in run cycle 4 (got %0d)", first_cycle));
    check(last_cycle == 59, $sformatf("last bit at the root in run cycle 59 (got %0d)", last_cycle));
    read_and_check(e);

    // ---- 2: random partial loads with colliding destinations ----
    for (int r = 0; r < 10; r++) begin
      chip_reset();
      read_and_check(none);  // nothing received yet
      for (int i = 0; i < 8; i++) if ($urandom_range(0, 1)) write_pn(i, 7'($urandom));
      expected(e);
      run_until(e.size(), 200);
      check(rx.size() == e.size(), "partial load delivered");
      foreach (rx[n]) check(rx[n] == e[n], $sformatf("partial load message %0d", n));
      read_and_check(e);
    end

    // ---- 3: RUNINP dropped in mid-message, then resumed ----
    chip_reset();
    for (int i = 0; i < 8; i++) write_pn(i, {4'($urandom), 3'(i)});
    expected(e);
    runinp = 1;
    repeat (10) @(negedge clk);
    for (int h = 0; h < 3; h++) begin
      runinp = 0;
      repeat (3) begin
        @(negedge clk);
        check(s_vp == '0 && s_tp == '0, "halted: no switch offers or takes a bit");
      end
      n_run_halts++;
      runinp = 1;
      repeat (7 + h) @(negedge clk);
    end
    run_until(8, 200);
    check(rx.size() == 8, "halted run delivered everything");
    foreach (rx[n]) check(rx[n] == e[n], $sformatf("halted run message %0d", n));
    read_and_check(e);

    // ---- 4: auto mode repeats the sequence ----
    chip_reset();
    for (int i = 0; i < 8; i++) write_pn(i, {4'($urandom), 3'(7 - i)});
    expected(e);
    autoinp = 1;
    run_until(24, 400);
    autoinp = 0;
    check(rx.size() >= 24, "auto mode keeps sending");
    for (int n = 0; n < 24 && n < rx.size(); n++) begin
      check(rx[n] == e[n % 8], $sformatf("auto mode message %0d", n));
      if (n >= 8) n_auto_requeues++;
    end
    check(last_cycle - first_cycle + 1 >= 7 * 24, "auto mode at one bit per cycle");

    // ---- 5: reset in mid-run aborts and clears ----
    chip_reset();
    for (int i = 0; i < 8; i++) write_pn(i, {4'hf, 3'(i)});
    runinp = 1;
    repeat (30) @(negedge clk);
    resetinp = 1; runinp = 0;
    @(negedge clk);
    resetinp = 0;
    n_reset_aborts++;
    rx.delete();
    for (int i = 0; i < 8; i++) mq[i].delete();
    check(s_vp == '0 && adrb == '0, "reset clears the tree and ADRB");
    read_and_check(none);
    runinp = 1;
    repeat (20) @(negedge clk);
    runinp = 0;
    check(rx.size() == 0, "nothing left to send after reset");

    // ---- mechanism coverage ----
    check(n_slice_alternations > 0, "slice alternation happened");
    check(n_fallbacks > 0, "fall-back happened");
    check(n_stall_cycles > 0, "switch stall happened");
    check(n_run_halts > 0, "run halt happened");
    check(n_auto_requeues > 0, "auto requeue happened");
    check(n_reset_aborts > 0, "reset abort happened");
    check(n_not_ready_reads > 0, "not-ready read happened");
    $display("mechanisms: alternations=%0d fallbacks=%0d stall_cycles=%0d halts=%0d requeues=%0d resets=%0d not_ready_reads=%0d",
             n_slice_alternations, n_fallbacks, n_stall_cycles, n_run_halts, n_auto_requeues,
             n_reset_aborts, n_not_ready_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
