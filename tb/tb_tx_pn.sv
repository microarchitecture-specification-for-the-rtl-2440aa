// tb_tx_pn: self-checking test of one transmit PN.
// Loads random messages, takes their bits with random gaps and checks that the bits
// come out least significant first, that valid falls right after the seventh bit
// (and not before), that auto mode offers the same message again, that nothing moves
// while run is low, and that reset clears valid.
module tb_tx_pn;
  import tbh_pkg::*;

  logic clk = 0, rst, load, run, auto_mode, taken, bit_out, valid;
  msg_t din;
  int checks = 0, failures = 0;

  tx_pn dut (.clk, .rst, .load, .din, .run, .auto_mode, .taken, .bit_out, .valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // take the 7 bits of `m`, with random idle cycles, and check them
  task automatic take_message(input logic [6:0] m, input bit expect_valid_after);
    for (int b = 0; b < 7; b++) begin
      @(negedge clk);
      while ($urandom_range(0, 2) == 0) begin
        taken = 0;
        @(negedge clk);
        check(valid, "valid held while waiting");
      end
      check(valid, "valid before bit");
      check(bit_out == m[b], $sformatf("bit %0d", b));
      taken = 1;
      @(negedge clk);
      taken = 0;
    end
    check(valid == expect_valid_after, "valid after last bit");
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] m;
    rst = 1; load = 0; run = 0; auto_mode = 0; taken = 0; din = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    check(!valid, "valid low after reset");
    for (int n = 0; n < 20; n++) begin
      m = 7'($urandom);
      run = 0; din = m; load = 1;
      @(negedge clk);
      load = 0;
      check(valid, "valid right after write, before run");
      // run low: taken has no effect
      taken = 1;
      @(negedge clk);
      taken = 0;
      check(bit_out == m[0], "no shift while run is low");
      run = 1;
      auto_mode = (n % 3 == 0);
      take_message(m, auto_mode);
      if (auto_mode) begin
        auto_mode = 0;
        take_message(m, 1'b0);  // requeued message, identical bits
      end
    end
    // reset aborts a message
    din = 7'h55; load = 1; run = 0;
    @(negedge clk);
    load = 0; run = 1; taken = 1;
    @(negedge clk);
    taken = 0; rst = 1;
    @(negedge clk);
    rst = 0;
    check(!valid && bit_out == 1'b0, "reset clears valid and data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
