// shiftreg_tb: shifts random bits through the feedback-select register and
// checks all bits after every shift against a reference shift register
// (new bit enters at q[0]).
module shiftreg_tb;
  localparam int N = 8;
  logic ph1 = 0, ph2 = 0;
  logic d;
  logic [N-1:0] q, model;
  int checks = 0, failures = 0;

  shiftreg #(.N(N)) dut (.ph1(ph1), .ph2(ph2), .d(d), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    for (int i = 0; i < N; i++) begin
      d = 0; #5 ph2 = 1; #5 ph2 = 0; #5 ph1 = 1; #5 ph1 = 0;
    end
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      #5 ph2 = 1; #5 ph2 = 0;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q moved before ph1"); end
      #5 ph1 = 1; #5 ph1 = 0;
      model = {model[N-2:0], d};
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL shift %0d: got %b expected %b", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
