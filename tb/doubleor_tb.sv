// doubleor_tb: scans every 2-bit code into one OR-plane cell and checks that
// the output line is pulled down when a selected product is 1. The first bit
// shifted in selects product2, the second product1.
module doubleor_tb;
  logic ph1 = 0, ph2 = 0;
  logic d, q, p1, p2, pd;
  int checks = 0, failures = 0;

  doubleor dut (.ph1(ph1), .ph2(ph2), .d(d), .q(q), .product1(p1), .product2(p2), .pd(pd));

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
    logic s1, s2;
    for (int rep = 0; rep < 8; rep++)
      for (int code = 0; code < 4; code++) begin
        {s1, s2} = 2'(code);
        shift(s2);
        shift(s1);
        check(q, s2, "scan out");
        for (int v = 0; v < 4; v++) begin
          {p1, p2} = 2'(v);
          #1;
          check(pd, (p1 & s1) | (p2 & s2), "pulldown");
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
