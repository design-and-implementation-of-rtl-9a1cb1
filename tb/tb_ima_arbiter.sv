// tb_ima_arbiter: self-checking test of the cross-coupled NAND arbiter.
//
// Releases the latch (both inputs low, output must be 1), then raises the two
// inputs in a random order with a random, nonzero gap, and checks that the
// output shows which edge came first (0 for a_i, 1 for b_i), that it is set
// right after the first edge and that the second edge does not change it.
module tb_ima_arbiter;
  timeunit 1ps;
  timeprecision 1ps;

  logic a_i, b_i, q_o;
  int   checks = 0, failures = 0;
  int   a_wins = 0, b_wins = 0;

  ima_arbiter dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned gap;
    bit a_first;
    a_i = 0;
    b_i = 0;
    #100;
    for (int i = 0; i < 200; i++) begin
      a_i = 0;
      b_i = 0;
      #100;
      check(q_o == 1'b1, $sformatf("released output %b", q_o));
      a_first = 1'($urandom);
      gap     = 1 + $urandom_range(0, 49);
      if (a_first) a_i = 1; else b_i = 1;
      #1;
      check(q_o == !a_first, $sformatf("after first edge: a_first=%0b q=%b", a_first, q_o));
      #(gap);
      if (a_first) b_i = 1; else a_i = 1;
      #100;
      check(q_o == !a_first, $sformatf("after both edges: a_first=%0b gap=%0d q=%b",
                                       a_first, gap, q_o));
      if (a_first) a_wins++; else b_wins++;
    end
    check(a_wins > 0 && b_wins > 0, "both inputs won at least once");
    $display("a_i won %0d times, b_i won %0d times", a_wins, b_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
