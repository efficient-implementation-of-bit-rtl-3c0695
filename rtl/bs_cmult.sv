// bs_cmult: complex bit-slice multiplier p = a * w, built from four bit-slice
// multipliers, one bit-slice subtractor and one bit-slice adder:
//   p.re = (a.re*w.re) - (a.im*w.im),   p.im = (a.re*w.im) + (a.im*w.re)
// where each real product is truncated to W bits by bs_mult before the
// addition. w is a whole complex twiddle word, sampled with a's last slice.
// Latency LAT_CMUL = NDIG + 1 clocks.
// Four real multipliers per complex multiplication follow the source design.
module bs_cmult
  import fft_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  cdig_t  a,
  input  cword_t w,
  input  tag_t   tag_i,
  output cdig_t  p,
  output tag_t   tag_o
);

  dig_t rr, ii, ri, ir;
  tag_t t_rr, t_ii, t_ri, t_ir, t_im;

  bs_mult u_rr (.clk, .rst_n, .a(a.re), .w(w.re), .tag_i, .p(rr), .tag_o(t_rr));
  bs_mult u_ii (.clk, .rst_n, .a(a.im), .w(w.im), .tag_i, .p(ii), .tag_o(t_ii));
  bs_mult u_ri (.clk, .rst_n, .a(a.re), .w(w.im), .tag_i, .p(ri), .tag_o(t_ri));
  bs_mult u_ir (.clk, .rst_n, .a(a.im), .w(w.re), .tag_i, .p(ir), .tag_o(t_ir));

  bs_subtractor u_re (.clk, .rst_n, .a(rr), .b(ii), .tag_i(t_rr), .s(p.re), .tag_o(tag_o));
  bs_adder      u_im (.clk, .rst_n, .a(ri), .b(ir), .tag_i(t_rr), .s(p.im), .tag_o(t_im));

endmodule
