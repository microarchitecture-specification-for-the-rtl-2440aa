// tb_outmod: self-checking test of the receive PN buffer.
// Sends random 7-bit messages over the global receive line, bit 0 first, with random
// gaps and occasional run-low cycles, and keeps a reference copy of the eight receive
// registers. Checks the taken handshake, the address shown on ADRB after the third
// bit, the value read back from every register with ReadIN, RRdyOUT (low before a
// register has been written, high after), zero outputs while ReadIN is low, and reset.
module tb_outmod;
  import tbh_pkg::*;

  logic clk = 0, rst, run, sbitv, sbit, btaken, read_in, rrdy;
  logic [2:0] arin, adrb;
  value_t drout;
  int checks = 0, failures = 0;
  value_t ref_val [8];
  bit     ref_full [8];

  outmod dut (.clk, .rst, .run, .sbitv, .sbit, .btaken, .arin, .read_in, .drout, .rrdy, .adrb);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic send(input logic [6:0] m);
    for (int b = 0; b < 7; b++) begin
      while ($urandom_range(0, 3) == 0) begin
        sbitv = 0; run = ($urandom_range(0, 1) == 1);
        @(negedge clk);
      end
      run = 1; sbitv = 1; sbit = m[b];
      #1 check(btaken, "taken with valid");
      @(negedge clk);
      sbitv = 0;
      if (b == 2) check(adrb == m[2:0], $sformatf("address shown after third bit %h vs %h cnt %0d", adrb, m[2:0], dut.count));
    end
    ref_val[m[2:0]] = m[6:3];
    ref_full[m[2:0]] = 1;
  endtask

  task automatic read_all();
    for (int a = 0; a < 8; a++) begin
      arin = 3'(a); read_in = 1;
      #1;
      check(drout == ref_val[a], $sformatf("value of receive PN %0d: %h vs %h", a, drout, ref_val[a]));
      check(rrdy == ref_full[a], $sformatf("ready of receive PN %0d", a));
      read_in = 0;
      #1 check(drout == '0 && !rrdy, "outputs quiet without ReadIN");
      @(negedge clk);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; run = 0; sbitv = 0; sbit = 0; read_in = 0; arin = '0;
    for (int a = 0; a < 8; a++) begin ref_val[a] = '0; ref_full[a] = 0; end
    @(negedge clk); @(negedge clk);
    rst = 0;
    read_all();
    // run low: no taken even with valid
    sbitv = 1; run = 0;
    #1 check(!btaken, "no taken while run is low");
    @(negedge clk);
    @(negedge clk);
    sbitv = 0;
    for (int n = 0; n < 40; n++) begin
      send(7'($urandom));
      if (n % 8 == 7) read_all();
    end
    // reading in the middle of a message: the register being written is not ready
    begin
      logic [6:0] m;
      m = {4'h9, 3'd5};
      for (int b = 0; b < 4; b++) begin
        run = 1; sbitv = 1; sbit = m[b];
        @(negedge clk);
      end
      sbitv = 0;
      arin = 3'd5; read_in = 1;
      #1 check(!rrdy, "register being written is not ready");
      read_in = 0;
      @(negedge clk);
      for (int b = 4; b < 7; b++) begin
        sbitv = 1; sbit = m[b];
        @(negedge clk);
      end
      sbitv = 0;
      ref_val[5] = 4'h9; ref_full[5] = 1;
      read_all();
    end
    rst = 1;
    @(negedge clk);
    rst = 0;
    for (int a = 0; a < 8; a++) begin ref_val[a] = '0; ref_full[a] = 0; end
    read_all();
    check(adrb == 3'd0, "reset clears ADRB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
