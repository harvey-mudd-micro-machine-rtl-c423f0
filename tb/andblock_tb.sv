// andblock_tb: loads random AND-plane configurations (each literal present
// with probability 1/4, so products are neither always 0 nor always 1) and
// checks every product line for random inputs against a reference that
// evaluates each product as the AND of its selected literals. Bit p of the
// chain, counted from the scan input, belongs to input p/32, product
// 15-(p%32)/2, and means "requires 0" when p is even, "requires 1" when odd.
// The scan output is checked during every load.
module andblock_tb;
  localparam int N_IN = 8, N_PROD = 16;
  localparam int NB = 2 * N_IN * N_PROD;
  logic ph1 = 0, ph2 = 0;
  logic d, q;
  logic [N_IN-1:0]   ins;
  logic [N_PROD-1:0] products;
  bit   model [NB];
  int checks = 0, failures = 0;
  int seen_one = 0;

  andblock #(.N_IN(N_IN), .N_PROD(N_PROD)) dut (
    .ph1(ph1), .ph2(ph2), .d(d), .q(q), .ins(ins), .products(products));

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

  function automatic logic [N_PROD-1:0] expected(logic [N_IN-1:0] x);
    logic [N_PROD-1:0] r;
    for (int m = 0; m < N_PROD; m++) begin
      r[m] = 1;
      for (int k = 0; k < N_IN; k++) begin
        int base = 2 * N_PROD * k + 2 * (N_PROD - 1 - m);
        if (model[base]     && x[k])  r[m] = 0;  // requires input 0
        if (model[base + 1] && !x[k]) r[m] = 0;  // requires input 1
      end
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
        shift(($urandom % 4) == 0);
        if (p % 16 == 0) check(N_PROD'(q), N_PROD'(model[NB-1]), "scan out");
      end
      for (int v = 0; v < 256; v++) begin
        ins = N_IN'(v);
        #1;
        check(products, expected(ins), "products");
        if (products != 0) seen_one++;
      end
    end
    checks++;
    if (seen_one == 0) begin
      failures++;
      $display("FAIL no product ever went high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
