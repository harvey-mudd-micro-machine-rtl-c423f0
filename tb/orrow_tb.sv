// orrow_tb: loads random configurations into one OR-plane row and checks
// the pulldown of every output line for all four product combinations.
// Reference chain, counted from the scan input: output j's product1 bit at
// 2*(N_OUT-1-j), its product2 bit right after it.
module orrow_tb;
  localparam int N_OUT = 16;
  localparam int NB = 2 * N_OUT;
  logic ph1 = 0, ph2 = 0;
  logic d, q, p1, p2;
  logic [N_OUT-1:0] pd;
  bit   model [NB];
  int checks = 0, failures = 0;

  orrow #(.N_OUT(N_OUT)) dut (.ph1(ph1), .ph2(ph2), .d(d), .q(q),
                              .product1(p1), .product2(p2), .pd(pd));

  task automatic check(logic [N_OUT-1:0] got, logic [N_OUT-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic shift(logic bit_in);
    d = bit_in;
    #5 ph2 = 1; #5 ph2 = 0; #5 ph1 = 1; #5 ph1 = 0;
    for (int p = NB - 1; p > 0; p--) model[p] = model[p-1];
    model[0] = bit_in;
  endtask

  function automatic logic [N_OUT-1:0] expected(logic x1, logic x2);
    logic [N_OUT-1:0] r;
    for (int j = 0; j < N_OUT; j++) begin
      int base = 2 * (N_OUT - 1 - j);
      r[j] = (x1 & model[base]) | (x2 & model[base + 1]);
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NB; p++) shift(0);
    for (int cfg = 0; cfg < 6; cfg++) begin
      for (int p = 0; p < NB; p++) begin
        shift(1'($urandom));
        check(N_OUT'(q), N_OUT'(model[NB-1]), "scan out");
      end
      for (int v = 0; v < 4; v++) begin
        {p1, p2} = 2'(v);
        #1;
        check(pd, expected(p1, p2), "pd");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
