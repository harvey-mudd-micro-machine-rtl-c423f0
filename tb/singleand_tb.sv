// singleand_tb: scans every 2-bit code into one AND-plane cell and checks the
// pulldown against the literal encoding: first bit shifted in lands in the
// second (complement) cell. Code (first cell, second cell): 00 don't care,
// 10 pull down when a=1, 01 pull down when a=0, 11 always pull down.
module singleand_tb;
  logic ph1 = 0, ph2 = 0;
  logic d, q, a, pd;
  int checks = 0, failures = 0;

  singleand dut (.ph1(ph1), .ph2(ph2), .d(d), .q(q), .a(a), .a_b(~a), .pd(pd));

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic shift(logic bit_in);
    d = bit_in;
    #5 ph2 = 1; #5 ph2 = 0; #5 ph1 = 1; #5 ph1 = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic true_bit, comp_bit, prev_first;
    prev_first = 0;
    shift(0); shift(0);
    for (int rep = 0; rep < 8; rep++)
      for (int code = 0; code < 4; code++) begin
        {true_bit, comp_bit} = 2'(code);
        shift(comp_bit);   // first in goes deepest
        check(q, prev_first, "scan out after first shift");
        shift(true_bit);
        check(q, comp_bit, "scan out holds deeper bit");
        prev_first = true_bit;
        a = 1; #1;
        check(pd, true_bit, "a=1");
        a = 0; #1;
        check(pd, comp_bit, "a=0");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
