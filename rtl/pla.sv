// pla: a small field-programmable logic array with registered feedback.
//
// Eight inputs pass through per-input multiplexers (muxslice) into an AND
// plane (andblock) that forms 16 product terms, each an AND of any chosen
// true or complemented inputs. An OR plane (orblock) combines any chosen
// products into each of 16 outputs, DOUT[15:0]. Outputs 7..0 are also
// registered by the feedback flops on the logic clock, and each input k can
// be switched from DIN[k] to the registered DOUT[k], which turns the array
// into a small state machine.
//
// All programmable bits form one 520-bit scan chain on the configuration
// clock: configD -> AND plane (256) -> OR plane (256) -> feedback selects
// (8) -> configQ. Shifting in 520 bits, the first bit shifted in being the
// one that must end next to configQ, programs the chip; the previous contents
// come out on configQ at the same time. Bit positions counted from configD:
//   0..255    AND plane, p = 32*k + 2*(15-m) + c: input k, product m,
//             c=0 "product requires input k = 0", c=1 "requires input k = 1"
//   256..511  OR plane, p = 256 + 32*(m/2) + 2*(15-j) + (m odd ? 0 : 1):
//             product m contributes to output j
//   512..519  feedback select for input k at 512 + k
//
// Clocks: two independent two-phase, non-overlapping clocks. The
// configuration clock (configPh1/configPh2) shifts the chain one place per
// ph2/ph1 pulse pair; the logic clock (logicPh1/logicPh2) updates the
// feedback flops. DOUT is combinational from DIN and the feedback state.
// reset (active high) clears the feedback flops on the next logic clock and
// leaves the configuration alone.
//
// Lint and synthesis tools report a combinational loop from DOUT[7:0]
// through the feedback latches, the multiplexers and both planes back to
// DOUT. It exists only while a latch is transparent: the master latch opens
// on logicPh2 and the slave on logicPh1, and because the two phases never
// overlap the loop is always cut by a closed latch. It is the intended
// state-machine path, not a fault.
//
// The block structure, sizes, chain order and pin set follow the chip; the
// two-state model of the pull-up/pulldown planes is this model's own.
module pla
#(
  parameter int N_IN   = hmum_pkg::N_IN,
  parameter int N_PROD = hmum_pkg::N_PROD,
  parameter int N_OUT  = hmum_pkg::N_OUT,
  parameter int N_FB   = hmum_pkg::N_FB
) (
  input  logic             configPh1,
  input  logic             configPh2,
  input  logic             configD,
  output logic             configQ,
  input  logic [N_IN-1:0]  din,
  output logic [N_OUT-1:0] dout,
  input  logic             logicPh1,
  input  logic             logicPh2,
  input  logic             reset
);
  logic [N_IN-1:0]   ins;
  logic [N_PROD-1:0] products;
  logic [N_FB-1:0]   state;
  logic [N_FB-1:0]   fb_sel;
  logic [N_FB-1:0]   fb_ins;
  logic              d_and, d_or;

  // Feedback multiplexers on the low N_FB inputs; higher inputs come from pins.
  muxslice #(.N(N_FB)) feedback_mux (
    .d0(din[N_FB-1:0]), .d1(state), .s(fb_sel), .y(fb_ins)
  );

  if (N_IN > N_FB) begin : g_wide
    assign ins = {din[N_IN-1:N_FB], fb_ins};
  end else begin : g_narrow
    assign ins = fb_ins;
  end

  andblock #(.N_IN(N_IN), .N_PROD(N_PROD)) and_plane (
    .ph1(configPh1), .ph2(configPh2), .d(configD), .q(d_and),
    .ins(ins), .products(products)
  );

  orblock #(.N_PROD(N_PROD), .N_OUT(N_OUT)) or_plane (
    .ph1(configPh1), .ph2(configPh2), .d(d_and), .q(d_or),
    .products(products), .outs(dout)
  );

  shiftreg #(.N(N_FB)) feedback_select (
    .ph1(configPh1), .ph2(configPh2), .d(d_or), .q(fb_sel)
  );

  feedbackflops #(.N(N_FB)) feedback_flops (
    .ph1(logicPh1), .ph2(logicPh2), .reset(reset),
    .d(dout[N_FB-1:0]), .q(state)
  );

  assign configQ = fb_sel[N_FB-1];

  // Length of the configuration chain (520 at the default sizes).
  localparam int CHAIN_BITS = hmum_pkg::cfg_bits(N_IN, N_PROD, N_OUT, N_FB);

  initial begin
    assert (N_FB <= N_IN && N_FB <= N_OUT)
      else $error("pla: N_FB must not exceed N_IN or N_OUT");
    assert (N_IN != hmum_pkg::N_IN || N_PROD != hmum_pkg::N_PROD ||
            N_OUT != hmum_pkg::N_OUT || N_FB != hmum_pkg::N_FB ||
            CHAIN_BITS == hmum_pkg::CFG_BITS)
      else $error("pla: chain length mismatch");
  end
endmodule
