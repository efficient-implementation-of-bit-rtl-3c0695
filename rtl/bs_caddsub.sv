// bs_caddsub: complex bit-slice add/subtract s = a +/- b, or a +/- j*b.
// One bit-slice adder or subtractor per real part, chosen by SUB_RE / SUB_IM;
// SWAP_B crosses b's parts so that
//   a + b    : SUB_RE=0 SUB_IM=0 SWAP_B=0     a - b    : SUB_RE=1 SUB_IM=1 SWAP_B=0
//   a - j*b  : SUB_RE=0 SUB_IM=1 SWAP_B=1     a + j*b  : SUB_RE=1 SUB_IM=0 SWAP_B=1
// Multiplying by -j or j is therefore only wiring. Latency 1 clock.
// This is a helper of this design, grouping the adders and subtractors
// the source design's cells use.
module bs_caddsub
  import fft_pkg::*;
#(
  parameter bit SUB_RE = 1'b0,
  parameter bit SUB_IM = 1'b0,
  parameter bit SWAP_B = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cdig_t a,
  input  cdig_t b,
  input  tag_t  tag_i,
  output cdig_t s,
  output tag_t  tag_o
);

  dig_t b_re, b_im;
  tag_t tag_im;

  assign b_re = SWAP_B ? b.im : b.re;
  assign b_im = SWAP_B ? b.re : b.im;

  if (SUB_RE) begin : g_re_sub
    bs_subtractor u_re (.clk, .rst_n, .a(a.re), .b(b_re), .tag_i, .s(s.re), .tag_o(tag_o));
  end else begin : g_re_add
    bs_adder      u_re (.clk, .rst_n, .a(a.re), .b(b_re), .tag_i, .s(s.re), .tag_o(tag_o));
  end

  if (SUB_IM) begin : g_im_sub
    bs_subtractor u_im (.clk, .rst_n, .a(a.im), .b(b_im), .tag_i, .s(s.im), .tag_o(tag_im));
  end else begin : g_im_add
    bs_adder      u_im (.clk, .rst_n, .a(a.im), .b(b_im), .tag_i, .s(s.im), .tag_o(tag_im));
  end

endmodule
