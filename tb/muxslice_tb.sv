// muxslice_tb: random and exhaustive-per-bit checks of the feedback
// multiplexers: y[k] = s[k] ? d1[k] : d0[k].
module muxslice_tb;
  localparam int N = 8;
  logic [N-1:0] d0, d1, s, y;
  int checks = 0, failures = 0;

  muxslice #(.N(N)) dut (.d0(d0), .d1(d1), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      d0 = N'($urandom); d1 = N'($urandom); s = N'($urandom);
      #1;
      checks++;
      if (y !== ((d1 & s) | (d0 & ~s))) begin
        failures++;
        $display("FAIL d0=%b d1=%b s=%b y=%b", d0, d1, s, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
