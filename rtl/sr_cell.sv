// sr_cell: split-radix decimation-in-frequency butterfly calculating cell
// (the "L-shaped" butterfly). With a, b, c, d = x(n), x(n+N/4), x(n+N/2),
// x(n+3N/4) and two twiddle factors w1 = W_N^n, w3 = W_N^3n:
//   u0 = a + c                     (to the half-size DFT of the even outputs)
//   u1 = b + d
//   z1 = ((a - c) - j(b - d)) * w1 (to the quarter-size DFT of outputs 4k+1)
//   z3 = ((a - c) + j(b - d)) * w3 (to the quarter-size DFT of outputs 4k+3)
// Multiplying by -j or j is wiring inside bs_caddsub. Eight bit-slice multipliers
// (two complex multipliers). u0/u1 are delayed so that all four outputs leave
// together, LAT_SR = 2*LAT_ADD + LAT_CMUL clocks after the inputs.
// The cell's function and multiplier count follow the source design (which
// states six adders and six subtractors but reports totals for the whole unit
// that match the eight built here); the pipelining is this design's choice.
// The twiddle inputs are sampled when a word reaches the multipliers, 2*LAT_ADD
// clocks after it entered, so they must be held while words pass (inside
// the eight-point blocks they are constants).
module sr_cell
  import fft_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  cdig_t  a,
  input  cdig_t  b,
  input  cdig_t  c,
  input  cdig_t  d,
  input  cword_t w1,
  input  cword_t w3,
  input  tag_t   tag_i,
  output cdig_t  u0,
  output cdig_t  u1,
  output cdig_t  z1,
  output cdig_t  z3,
  output tag_t   tag_o
);

  cdig_t s0, s1, d0, d1, e1, e3;
  tag_t  t_s0, t_s1, t_d0, t_d1, t_e1, t_e3, t_z3;

  bs_caddsub #(.SUB_RE(1'b0), .SUB_IM(1'b0), .SWAP_B(1'b0)) u_s0
    (.clk, .rst_n, .a(a), .b(c), .tag_i, .s(s0), .tag_o(t_s0));
  bs_caddsub #(.SUB_RE(1'b0), .SUB_IM(1'b0), .SWAP_B(1'b0)) u_s1
    (.clk, .rst_n, .a(b), .b(d), .tag_i, .s(s1), .tag_o(t_s1));
  bs_caddsub #(.SUB_RE(1'b1), .SUB_IM(1'b1), .SWAP_B(1'b0)) u_d0
    (.clk, .rst_n, .a(a), .b(c), .tag_i, .s(d0), .tag_o(t_d0));
  bs_caddsub #(.SUB_RE(1'b1), .SUB_IM(1'b1), .SWAP_B(1'b0)) u_d1
    (.clk, .rst_n, .a(b), .b(d), .tag_i, .s(d1), .tag_o(t_d1));

  // e1 = d0 - j*d1, e3 = d0 + j*d1
  bs_caddsub #(.SUB_RE(1'b0), .SUB_IM(1'b1), .SWAP_B(1'b1)) u_e1
    (.clk, .rst_n, .a(d0), .b(d1), .tag_i(t_d0), .s(e1), .tag_o(t_e1));
  bs_caddsub #(.SUB_RE(1'b1), .SUB_IM(1'b0), .SWAP_B(1'b1)) u_e3
    (.clk, .rst_n, .a(d0), .b(d1), .tag_i(t_d0), .s(e3), .tag_o(t_e3));

  bs_cmult u_m1 (.clk, .rst_n, .a(e1), .w(w1), .tag_i(t_e1), .p(z1), .tag_o(tag_o));
  bs_cmult u_m3 (.clk, .rst_n, .a(e3), .w(w3), .tag_i(t_e3), .p(z3), .tag_o(t_z3));

  bs_delay #(.N(LAT_ADD + LAT_CMUL), .WIDTH($bits(cdig_t))) u_dly0 (.clk, .d(s0), .q(u0));
  bs_delay #(.N(LAT_ADD + LAT_CMUL), .WIDTH($bits(cdig_t))) u_dly1 (.clk, .d(s1), .q(u1));

endmodule
