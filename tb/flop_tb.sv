// flop_tb: checks the two-phase master/slave flop.
// A 4-bit flop is driven with non-overlapping ph2/ph1 pulses. Checks: q holds
// while only the master is open, q takes the value d had when ph2 closed once
// ph1 opens, and a change of d outside the ph2 pulse is not captured.
module flop_tb;
  localparam int W = 4;
  logic ph1 = 0, ph2 = 0;
  logic [W-1:0] d, q, prev, captured;
  int checks = 0, failures = 0;

  flop #(.WIDTH(W)) dut (.ph1(ph1), .ph2(ph2), .d(d), .q(q));

  task automatic check(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    #5 ph2 = 1; #5 ph2 = 0; #5 ph1 = 1; #5 ph1 = 0;
    check(q, '0, "initial load");
    for (int i = 0; i < 200; i++) begin
      prev = q;
      captured = W'($urandom);
      d = W'($urandom);           // value while master is closed: ignored
      #2 d = captured;
      #3 ph2 = 1;
      #2 d = W'($urandom);        // transparent: the last value counts
      #1 d = captured;
      #2 ph2 = 0;
      #1 d = ~captured;           // changes after ph2 closes are ignored
      check(q, prev, "q holds until ph1");
      #4 ph1 = 1; #5;
      check(q, captured, "q after ph1");
      ph1 = 0;
      #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
