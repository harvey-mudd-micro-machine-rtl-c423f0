// feedbackflops_tb: random data and reset through the feedback register.
// q must take d (or zero while reset is 1) only after a full ph2/ph1 pulse
// pair, and must hold between pulses.
module feedbackflops_tb;
  localparam int N = 8;
  logic ph1 = 0, ph2 = 0, reset;
  logic [N-1:0] d, q, model;
  int checks = 0, failures = 0, resets = 0;

  feedbackflops #(.N(N)) dut (.ph1(ph1), .ph2(ph2), .reset(reset), .d(d), .q(q));

  task automatic check(logic [N-1:0] got, logic [N-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; d = N'($urandom);
    #5 ph2 = 1; #5 ph2 = 0; #5 ph1 = 1; #5 ph1 = 0;
    model = '0;
    check(q, model, "after reset");
    for (int i = 0; i < 300; i++) begin
      reset = ($urandom % 5) == 0;
      d = N'($urandom);
      #5;
      check(q, model, "holds while d changes");
      ph2 = 1; #5 ph2 = 0; #5 ph1 = 1; #5 ph1 = 0;
      model = reset ? '0 : d;
      if (reset && d != 0) resets++;
      check(q, model, "after clock");
    end
    checks++;
    if (resets == 0) begin failures++; $display("FAIL reset never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
