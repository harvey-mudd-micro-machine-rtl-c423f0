// pla_tb: end-to-end test of the programmable logic array at its full size
// (8 inputs, 16 products, 16 outputs, 8 feedback paths, 520-bit chain).
//
// Each configuration is written as a table in the style of a PLA "dot
// diagram": one string of literals per product (leftmost character = input 7,
// '1' input must be 1, '0' input must be 0, 'x' don't care, 'n' never), one
// string per output choosing products (leftmost = product 15), and one
// feedback-select bit per input. The testbench turns the tables into the
// 520 chain bits with the chain map documented in pla.sv, shifts them in on
// the configuration clock, and then runs the logic clock. Outputs are
// compared with a behavioural evaluation of the same tables and, where the
// expected values are known from first principles, with those too:
//   - seven-segment decoder (combinational), against a fixed truth table
//   - 7-bit shift register built from feedback, against fixed vectors
//   - hexadecimal counter with seven-segment, Gray and binary outputs,
//     against arithmetic, including reset and wrap-around
//   - 3-to-8 decoder plus 8-input AND and NOR, against arithmetic
//   - 8-input OR/NAND, 2-input AND/OR/NAND/NOR, 2-, 3- and 4-input
//     XOR/XNOR, against arithmetic
//   - random configurations with random feedback and reset
// While each configuration is shifted in, the previous one must come out of
// configQ bit for bit, which checks the chain length and order.
// Mechanisms counted (each must occur): configuration load, configQ
// read-back, combinational use, registered feedback, reset of the feedback
// flops, counter wrap-around, a product forced to 0 by both literals.
module pla_tb;
  localparam int N_IN = 8, N_PROD = 16, N_OUT = 16, N_FB = 8;
  localparam int NB = 2 * N_IN * N_PROD + N_PROD * N_OUT + N_FB;  // 520

  typedef enum logic [1:0] {DC, NEED0, NEED1, NEVER} lit_e;

  typedef struct {
    lit_e             lit [N_PROD][N_IN];
    logic [N_PROD-1:0] sum [N_OUT];
    logic [N_FB-1:0]   fb;
  } plan_t;

  logic configPh1 = 0, configPh2 = 0, configD = 0, configQ;
  logic logicPh1 = 0, logicPh2 = 0, reset = 0;
  logic [N_IN-1:0]  din = '0;
  logic [N_OUT-1:0] dout;

  int checks = 0, failures = 0;
  int n_load = 0, n_readback = 0, n_comb = 0, n_feedback = 0, n_reset = 0;
  int n_wrap = 0, n_never = 0;

  plan_t cur;
  bit    cur_bits [NB];
  bit    have_cur = 0;
  logic [N_FB-1:0] state_ref = '0;

  pla dut (
    .configPh1(configPh1), .configPh2(configPh2), .configD(configD), .configQ(configQ),
    .din(din), .dout(dout), .logicPh1(logicPh1), .logicPh2(logicPh2), .reset(reset)
  );

  // Watchdog: the whole run takes well under 2 ms of simulated time.
  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N_OUT-1:0] got, logic [N_OUT-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // ---------------- tables ----------------
  function automatic void clear_plan(ref plan_t p);
    foreach (p.lit[m, k]) p.lit[m][k] = DC;
    foreach (p.sum[j]) p.sum[j] = '0;
    p.fb = '0;
  endfunction

  // Product row m from a literal string, leftmost character = input 7.
  function automatic void set_product(ref plan_t p, input int m, input string s);
    for (int c = 0; c < N_IN; c++) begin
      int k = N_IN - 1 - c;
      case (s[c])
        "1":     p.lit[m][k] = NEED1;
        "0":     p.lit[m][k] = NEED0;
        "n":     p.lit[m][k] = NEVER;
        default: p.lit[m][k] = DC;
      endcase
    end
  endfunction

  // Output j from a product-selection string, leftmost = product 15; '_' ignored.
  function automatic void set_sum(ref plan_t p, input int j, input string s);
    int m = N_PROD - 1;
    for (int c = 0; c < s.len(); c++)
      if (s[c] != "_") begin
        p.sum[j][m] = (s[c] == "1");
        m--;
      end
  endfunction

  // Chain bits, index = position counted from configD.
  function automatic void plan_bits(const ref plan_t p, ref bit b [NB]);
    foreach (b[i]) b[i] = 0;
    for (int k = 0; k < N_IN; k++)
      for (int m = 0; m < N_PROD; m++) begin
        int base = 2 * N_PROD * k + 2 * (N_PROD - 1 - m);
        b[base]     = p.lit[m][k] inside {NEED0, NEVER};
        b[base + 1] = p.lit[m][k] inside {NEED1, NEVER};
      end
    for (int m = 0; m < N_PROD; m++)
      for (int j = 0; j < N_OUT; j++)
        b[2 * N_IN * N_PROD + 2 * N_OUT * (m / 2) + 2 * (N_OUT - 1 - j) + ((m % 2 != 0) ? 0 : 1)]
          = p.sum[j][m];
    for (int k = 0; k < N_FB; k++) b[NB - N_FB + k] = p.fb[k];
  endfunction

  // Behavioural evaluation of a plan.
  function automatic logic [N_OUT-1:0] eval(const ref plan_t p, input logic [N_IN-1:0] x,
                                            logic [N_FB-1:0] st);
    logic [N_IN-1:0]   in = x;
    logic [N_PROD-1:0] prod;
    logic [N_OUT-1:0]  y;
    for (int k = 0; k < N_FB; k++) if (p.fb[k]) in[k] = st[k];
    for (int m = 0; m < N_PROD; m++) begin
      prod[m] = 1;
      for (int k = 0; k < N_IN; k++)
        case (p.lit[m][k])
          NEED0: if (in[k])  prod[m] = 0;
          NEED1: if (!in[k]) prod[m] = 0;
          NEVER: prod[m] = 0;
          default: ;
        endcase
    end
    for (int j = 0; j < N_OUT; j++) y[j] = |(prod & p.sum[j]);
    return y;
  endfunction

  // ---------------- clocks ----------------
  task automatic scan_shift(bit b);
    configD = b;
    #5 configPh2 = 1; #5 configPh2 = 0; #5 configPh1 = 1; #5 configPh1 = 0;
  endtask

  // Shift a plan in; the old contents must come out of configQ.
  task automatic load(plan_t p);
    bit nb [NB];
    plan_bits(p, nb);
    for (int i = 0; i < NB; i++) begin
      // before shift i, configQ shows old bit at position NB-1-i
      if (have_cur) begin
        checks++;
        if (configQ !== cur_bits[NB - 1 - i]) begin
          failures++;
          $display("FAIL configQ bit %0d", i);
        end
        n_readback++;
      end
      scan_shift(nb[NB - 1 - i]);
    end
    cur = p;
    cur_bits = nb;
    have_cur = 1;
    n_load++;
    foreach (p.lit[m, k]) if (p.lit[m][k] == NEVER) n_never++;
  endtask

  // One logic cycle: apply inputs, check outputs, clock the feedback flops.
  // 'known', when given, is the output worked out independently of the tables.
  task automatic logic_cycle(logic [N_IN-1:0] x, logic rst, string what,
                             logic [N_OUT-1:0] known = '0, bit use_known = 0);
    logic [N_OUT-1:0] exp;
    din = x;
    reset = rst;
    #2;
    exp = eval(cur, x, state_ref);
    check(dout, exp, what);
    if (use_known) check(dout, known, {what, " (independent)"});
    if (cur.fb == 0) n_comb++;
    else if ((cur.fb & state_ref) != 0) n_feedback++;
    #3 logicPh2 = 1; #5 logicPh2 = 0; #5 logicPh1 = 1; #5 logicPh1 = 0;
    if (rst && exp[N_FB-1:0] != 0) n_reset++;
    state_ref = rst ? '0 : exp[N_FB-1:0];
  endtask

  // ---------------- workloads ----------------
  // Active-low seven-segment codes {a,b,c,d,e,f,g} for hex digits 0..F.
  localparam logic [6:0] SEG [16] = '{
    7'b0000001, 7'b1001111, 7'b0010010, 7'b0000110,
    7'b1001100, 7'b0100100, 7'b0100000, 7'b0001111,
    7'b0000000, 7'b0001100, 7'b0001000, 7'b1100000,
    7'b1110010, 7'b1000010, 7'b0110000, 7'b0111000};

  // Product m (one-hot decoder of the 4-bit value 15-m) in the bits selected by 'hi'.
  function automatic string hex_literal(int v, bit hi);
    string s = "";
    for (int b = 3; b >= 0; b--) s = {s, (((v >> b) & 1) != 0) ? "1" : "0"};
    return hi ? {s, "xxxx"} : {"xxxx", s};
  endfunction

  task automatic run_7seg();
    plan_t p;
    clear_plan(p);
    for (int v = 0; v < 16; v++) set_product(p, 15 - v, hex_literal(v, 1));
    // output 7-i carries segment i (a..g); a product is in the sum when the
    // segment is off (active-low display)
    for (int s = 0; s < 7; s++)
      for (int v = 0; v < 16; v++) p.sum[7 - s][15 - v] = SEG[v][6 - s];
    load(p);
    reset = 1; logic_cycle('0, 1, "7seg reset");
    for (int rep = 0; rep < 2; rep++)
      for (int v = 0; v < 16; v++) begin
        logic_cycle(N_IN'(v << 4), 0, "7seg", {8'h00, SEG[v], 1'b0}, 1);
      end
  endtask

  task automatic run_7shift();
    plan_t p;
    logic [7:0] vin  [10] = '{8'h80, 8'h00, 8'h80, 8'h00, 8'h80, 8'h00, 8'h80, 8'h00, 8'h80, 8'h01};
    logic [7:0] vout [10] = '{8'h40, 8'h20, 8'h50, 8'h28, 8'h54, 8'h2a, 8'h55, 8'h2a, 8'h55, 8'h2a};
    clear_plan(p);
    for (int i = 0; i < 8; i++) begin
      string s = "xxxxxxxx";
      s[i] = "1";
      set_product(p, 15 - i, s);    // product 15-i passes input 7-i
    end
    for (int i = 1; i < 8; i++) p.sum[7 - i][15 - (i - 1)] = 1;  // output 7-i = input 8-i
    p.fb = 8'h7f;
    load(p);
    logic_cycle('0, 1, "7shift reset");
    for (int t = 0; t < 10; t++) begin
      logic_cycle(vin[t], 0, "7shift", {8'h00, vout[t]}, 1);
    end
  endtask

  task automatic run_counter();
    plan_t p;
    logic [3:0] s;
    clear_plan(p);
    // products decode the state on inputs 3..0 (fed back from outputs 3..0)
    for (int v = 0; v < 16; v++) set_product(p, 15 - v, hex_literal(v, 0));
    for (int v = 0; v < 16; v++) begin
      logic [3:0] nxt = 4'(v + 1);
      logic [3:0] gray = 4'(v ^ (v >> 1));
      for (int sg = 0; sg < 7; sg++) p.sum[14 - sg][15 - v] = SEG[v][6 - sg];
      for (int b = 0; b < 4; b++) begin
        p.sum[4 + b][15 - v] = gray[b];
        p.sum[b][15 - v]     = nxt[b];
      end
    end
    p.fb = 8'h0f;
    load(p);
    logic_cycle(8'h00, 1, "counter reset");
    s = 0;
    for (int t = 0; t < 40; t++) begin
      logic rst = (t == 23);
      logic [3:0] g = s ^ (s >> 1);
      logic_cycle(N_IN'($urandom) & 8'hf0, rst, "counter", {1'b0, SEG[s], g, 4'(s + 1)}, 1);
      if (s == 4'hf && !rst) n_wrap++;
      s = rst ? 4'h0 : 4'(s + 1);
    end
  endtask

  task automatic run_decoders();
    plan_t p;
    clear_plan(p);
    for (int v = 0; v < 8; v++) begin
      string lit = "xxxxx";
      for (int b = 2; b >= 0; b--) lit = {lit, (((v >> b) & 1) != 0) ? "1" : "0"};
      set_product(p, v, lit);
      p.sum[v][v] = 1;
    end
    set_product(p, 8, "11111111");  // 8-input AND
    set_product(p, 9, "00000000");  // 8-input NOR
    set_product(p, 10, "xxxnxxxx"); // never true
    p.sum[8][8]  = 1;
    p.sum[9][9]  = 1;
    p.sum[10][10] = 1;
    load(p);
    for (int v = 0; v < 256; v++) begin
      logic_cycle(N_IN'(v), 0, "decoders",
                  {5'b0, 1'b0, 1'(v == 0), 1'(v == 255), 8'(1 << (v % 8))}, 1);
    end
  endtask

  // Small gate workloads: 0 = 8-input OR and NAND, 1 = 2-input AND/OR/NAND/NOR,
  // 2 = 2- and 3-input XOR/XNOR, 3 = 4-input XOR/XNOR.
  function automatic bit gate_ref(int id, int j, logic [N_IN-1:0] x);
    case (id)
      0: return (j == 0) ? |x : ~&x;
      1: case (j)
           0: return x[0] & x[1];
           1: return x[0] | x[1];
           2: return ~(x[0] & x[1]);
           default: return ~(x[0] | x[1]);
         endcase
      2: case (j)
           0: return ^x[1:0];
           1: return ~^x[1:0];
           2: return ^x[2:0];
           default: return ~^x[2:0];
         endcase
      default: return (j == 0) ? ^x[3:0] : ~^x[3:0];
    endcase
  endfunction

  task automatic run_gates(int id, int nvars, int nouts);
    plan_t p;
    int m = 0;
    clear_plan(p);
    if (id == 0) begin
      // one single-literal product per input and polarity
      for (int k = 0; k < N_IN; k++) begin
        p.lit[k][k] = NEED1;          p.sum[0][k] = 1;      // OR
        p.lit[8 + k][k] = NEED0;      p.sum[1][8 + k] = 1;  // NAND
      end
    end else begin
      // one minterm product per true row of each output
      for (int j = 0; j < nouts; j++)
        for (int v = 0; v < (1 << nvars); v++)
          if (gate_ref(id, j, N_IN'(v))) begin
            for (int k = 0; k < nvars; k++) p.lit[m][k] = ((v >> k) & 1) != 0 ? NEED1 : NEED0;
            p.sum[j][m] = 1;
            m++;
          end
    end
    load(p);
    for (int v = 0; v < 256; v++) begin
      logic [N_OUT-1:0] known = '0;
      for (int j = 0; j < nouts; j++) known[j] = gate_ref(id, j, N_IN'(v));
      logic_cycle(N_IN'(v), 0, "gates", known, 1);
    end
  endtask

  task automatic run_random(int n);
    plan_t p;
    for (int c = 0; c < n; c++) begin
      foreach (p.lit[m, k]) begin
        int r = $urandom % 16;
        p.lit[m][k] = (r < 2) ? NEED0 : (r < 4) ? NEED1 : (r == 4 && m == c) ? NEVER : DC;
      end
      foreach (p.sum[j]) p.sum[j] = N_PROD'($urandom) & N_PROD'($urandom);
      p.fb = N_FB'($urandom);
      load(p);
      logic_cycle(N_IN'($urandom), 1, "random reset");
      for (int t = 0; t < 60; t++)
        logic_cycle(N_IN'($urandom), ($urandom % 16) == 0, "random");
    end
  endtask

  task automatic require(int count, string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, count);
  endtask

  initial begin
    run_7seg();
    run_7shift();
    run_counter();
    run_decoders();
    run_gates(0, 8, 2);
    run_gates(1, 2, 4);
    run_gates(2, 3, 4);
    run_gates(3, 4, 2);
    run_random(6);
    $display("mechanism counts:");
    require(n_load,     "configuration loads");
    require(n_readback, "configQ read-back bits");
    require(n_comb,     "combinational cycles");
    require(n_feedback, "feedback cycles");
    require(n_reset,    "feedback resets");
    require(n_wrap,     "counter wrap-arounds");
    require(n_never,    "never-true literals");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
