// tb_mod7_cnt: self-checking test of the modulo-7 bit counter.
// Drives random increments and clears and compares count and last with a reference
// count kept in the testbench; also checks that seven increments from 0 wrap to 0.
module tb_mod7_cnt;
  import tbh_pkg::*;

  logic clk = 0, rst, clr, inc, last;
  cnt_t count;
  int checks = 0, failures = 0;
  int ref_cnt;

  mod7_cnt dut (.clk, .rst, .clr, .inc, .count, .last);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: count=%0d ref=%0d last=%0b", what, count, ref_cnt, last);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clr = 0; inc = 0; ref_cnt = 0;
    @(posedge clk); @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(count == 0, "reset");
    // exactly seven increments return to zero, last high only at six
    for (int i = 1; i <= 7; i++) begin
      inc = 1;
      @(posedge clk); #1;
      check(count == cnt_t'(i % 7), "wrap sequence");
      check(last == (i % 7 == 6), "last flag");
    end
    inc = 0;
    ref_cnt = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      inc = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 15) == 0);
      @(posedge clk);
      if (clr) ref_cnt = 0;
      else if (inc) ref_cnt = (ref_cnt + 1) % 7;
      #1;
      check(int'(count) == ref_cnt, "random");
      check(last == (ref_cnt == 6), "random last");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
