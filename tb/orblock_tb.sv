// orblock_tb: loads random OR-plane configurations and checks every output
// for random product vectors against a reference OR. Chain bit p, counted
// from the scan input, lies in product-pair row i = p/32 and output
// j = 15-(p%32)/2, and selects product 2i+1 when p is even, 2i when odd.
module orblock_tb;
  localparam int N_PROD = 16, N_OUT = 16;
  localparam int NB = N_PROD * N_OUT;
  logic ph1 = 0, ph2 = 0;
  logic d, q;
  logic [N_PROD-1:0] products;
  logic [N_OUT-1:0]  outs;
  bit   model [NB];
  int checks = 0, failures = 0;

  orblock #(.N_PROD(N_PROD), .N_OUT(N_OUT)) dut (
    .ph1(ph1), .ph2(ph2), .d(d), .q(q), .products(products), .outs(outs));

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

  function automatic logic [N_OUT-1:0] expected(logic [N_PROD-1:0] x);
    logic [N_OUT-1:0] r = '0;
    for (int m = 0; m < N_PROD; m++)
      for (int j = 0; j < N_OUT; j++) begin
        int p = 2 * N_OUT * (m / 2) + 2 * (N_OUT - 1 - j) + ((m % 2) ? 0 : 1);
        if (model[p] && x[m]) r[j] = 1;
      end
    return r;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NB; p++) shift(0);
    for (int cfg = 0; cfg < 6; cfg++) begin
      for (int p = 0; p < NB; p++) begin
        shift(($urandom % 8) == 0);
        if (p % 16 == 0) check(N_OUT'(q), N_OUT'(model[NB-1]), "scan out");
      end
      // single products first, then random mixtures
      for (int m = 0; m < N_PROD; m++) begin
        products = N_PROD'(1) << m;
        #1 check(outs, expected(products), "one product");
      end
      for (int v = 0; v < 100; v++) begin
        products = N_PROD'($urandom);
        #1 check(outs, expected(products), "random products");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
