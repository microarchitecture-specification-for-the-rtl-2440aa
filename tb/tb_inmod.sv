// tb_inmod: self-checking test of the transmit PN buffer.
// Writes random messages to all eight PNs in random order (one per cycle), checks that
// each write lands only in the addressed PN and raises its valid, then drains the PNs
// with randomly timed taken pulses and checks every PN's bit sequence (bit 0 first)
// and that its valid falls after its seventh bit. A second pass runs in auto mode and
// checks that each PN offers its message again.
module tb_inmod;
  import tbh_pkg::*;

  logic clk = 0, rst, write_in, run, auto_mode;
  logic [2:0] atin;
  msg_t dtin;
  logic [7:0] taken, bit_out, valid;
  int checks = 0, failures = 0;
  logic [6:0] msgs [8];
  int pos [8];

  inmod dut (.clk, .rst, .write_in, .atin, .dtin, .run, .auto_mode, .taken, .bit_out, .valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [8];
    int done_bits;
    rst = 1; write_in = 0; run = 0; auto_mode = 0; taken = '0; atin = '0; dtin = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    check(valid == 8'h00, "no valid after reset");
    for (int pass = 0; pass < 2; pass++) begin
      // random permutation of PN addresses
      for (int i = 0; i < 8; i++) order[i] = i;
      for (int i = 7; i > 0; i--) begin
        int j, t;
        j = $urandom_range(0, i);
        t = order[i]; order[i] = order[j]; order[j] = t;
      end
      for (int i = 0; i < 8; i++) begin
        logic [7:0] prev_valid;
        int a;
        prev_valid = valid;
        a = order[i];
        msgs[a] = 7'($urandom);
        atin = 3'(a); dtin = msgs[a]; write_in = 1;
        @(negedge clk);
        write_in = 0;
        check(valid == (prev_valid | (8'h01 << a)), $sformatf("write to PN %0d only", a));
        check(bit_out[a] == msgs[a][0], "written bit 0 visible");
        @(negedge clk);  // one idle cycle between writes
      end
      // write enable low: address/data changes do nothing
      atin = 3'd3; dtin = 7'h7f;
      @(negedge clk);
      check(bit_out[3] == msgs[3][0], "no write without WriteIN");
      auto_mode = (pass == 1);
      run = 1;
      for (int i = 0; i < 8; i++) pos[i] = 0;
      done_bits = 0;
      while (done_bits < 56) begin
        for (int i = 0; i < 8; i++) begin
          taken[i] = valid[i] && (pos[i] < 7) && ($urandom_range(0, 1) == 1);
          if (taken[i]) begin
            check(bit_out[i] == msgs[i][pos[i]], $sformatf("PN %0d bit %0d", i, pos[i]));
            pos[i]++;
            done_bits++;
          end
        end
        @(negedge clk);
        taken = '0;
        for (int i = 0; i < 8; i++)
          if (pos[i] == 7) check(valid[i] == auto_mode, $sformatf("PN %0d valid after message", i));
      end
      if (auto_mode) begin
        for (int i = 0; i < 8; i++) check(bit_out[i] == msgs[i][0], "auto: message offered again");
      end
      run = 0; auto_mode = 0;
      rst = 1;
      @(negedge clk);
      rst = 0;
      check(valid == 8'h00, "reset clears all PNs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
