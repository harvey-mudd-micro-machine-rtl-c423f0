// configpull_tb: two configuration cells chained as in a scan chain, the
// first also driving a bit line. Checks that each cell registers its scan
// input on a ph2/ph1 pulse pair, that values move on from the first cell to
// the second, that a pulse on d outside ph2 is not captured, and that the
// pulldown request is exactly (logic input AND stored bit).
module configpull_tb;
  logic ph1 = 0, ph2 = 0;
  logic d, a0, a1, q0, q1, pd0, pd1;
  logic e0, e1;  // expected stored bits
  int checks = 0, failures = 0;

  configpull c0 (.ph1(ph1), .ph2(ph2), .d(d),  .q(q0), .a(a0), .pd(pd0));
  configpull c1 (.ph1(ph1), .ph2(ph2), .d(q0), .q(q1), .a(a1), .pd(pd1));

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic shift(logic bit_in);
    d = bit_in;
    #5 ph2 = 1; #5 ph2 = 0;
    d = ~bit_in;  // glitch between the phases must not be captured
    #5 ph1 = 1; #5 ph1 = 0;
    d = bit_in;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a0 = 0; a1 = 0;
    shift(0); shift(0);
    e0 = 0; e1 = 0;
    for (int i = 0; i < 300; i++) begin
      logic b;
      b = 1'($urandom);
      shift(b);
      e1 = e0; e0 = b;
      check(q0, e0, "first cell");
      check(q1, e1, "second cell");
      for (int v = 0; v < 4; v++) begin
        {a0, a1} = 2'(v);
        #1;
        check(pd0, a0 & e0, "pulldown first");
        check(pd1, a1 & e1, "pulldown second");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
