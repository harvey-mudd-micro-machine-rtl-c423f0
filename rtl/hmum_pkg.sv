// hmum_pkg: sizes shared by the field-programmable PLA.
//
// The PLA has N_IN inputs, N_PROD product terms, N_OUT outputs and N_FB
// registered feedback paths. Its configuration is one serial scan chain:
// two bits per (input, product) crossing in the AND plane, one bit per
// (product, output) crossing in the OR plane and one select bit per feedback
// path, 520 bits at the default sizes. The sizes are those of the chip;
// the package only collects them so that every module agrees.
package hmum_pkg;
  localparam int N_IN   = 8;   // DIN[7:0]
  localparam int N_PROD = 16;  // product lines
  localparam int N_OUT  = 16;  // DOUT[15:0]
  localparam int N_FB   = 8;   // DOUT[7:0] may be fed back to DIN[7:0]

  // Length of the configuration scan chain.
  function automatic int cfg_bits(int n_in, int n_prod, int n_out, int n_fb);
    return 2 * n_in * n_prod + n_prod * n_out + n_fb;
  endfunction

  localparam int CFG_BITS = cfg_bits(N_IN, N_PROD, N_OUT, N_FB);  // 520
endpackage
