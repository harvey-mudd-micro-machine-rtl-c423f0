// androw_tb: loads random configurations into one AND-plane row and checks
// the scan output during loading and every product column's pulldown for
// both input values. The reference keeps its own copy of the chain, indexed
// from the scan input: product m's true-input bit at 2*(N_PROD-1-m), its
// complement-input bit right after it.
module androw_tb;
  localparam int N_PROD = 16;
  localparam int NB = 2 * N_PROD;
  logic ph1 = 0, ph2 = 0;
  logic d, q, a;
  logic [N_PROD-1:0] pd;
  bit   model [NB];
  int checks = 0, failures = 0;

  androw #(.N_PROD(N_PROD)) dut (.ph1(ph1), .ph2(ph2), .d(d), .q(q), .a(a), .pd(pd));

  task automatic check(logic [N_PROD-1:0] got, logic [N_PROD-1:0] exp, string what);
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

  function automatic logic [N_PROD-1:0] expected_pd(logic in);
    logic [N_PROD-1:0] r;
    for (int m = 0; m < N_PROD; m++) begin
      int base = 2 * (N_PROD - 1 - m);
      r[m] = in ? model[base] : model[base + 1];
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
        check(N_PROD'(q), N_PROD'(model[NB-1]), "scan out");
      end
      a = 1; #1; check(pd, expected_pd(1), "pd a=1");
      a = 0; #1; check(pd, expected_pd(0), "pd a=0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
