// r4_cell: radix-4 decimation-in-frequency butterfly calculating cell.
// Four points a, b, c, d and three twiddle factors w1, w2, w3 in:
//   y0 =  (a + c) + (b + d)
//   y1 = ((a - c) - j(b - d)) * w1
//   y2 = ((a + c) - (b + d))  * w2
//   y3 = ((a - c) + j(b - d)) * w3
// Twelve bit-slice multipliers (three complex multipliers), eleven bit-slice
// adders and eleven bit-slice subtractors, as the cell is described. y0 is
// delayed so that all outputs leave together, LAT_R4 = 2*LAT_ADD + LAT_CMUL
// clocks after the inputs.
// The cell's function and its unit counts follow the source design; the
// pipelining is this design's choice.
// The twiddle inputs are sampled when a word reaches the multipliers, 2*LAT_ADD
// clocks after it entered, so they must be held while words pass (inside
// the eight-point blocks they are constants).
module r4_cell
  import fft_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  cdig_t  a,
  input  cdig_t  b,
  input  cdig_t  c,
  input  cdig_t  d,
  input  cword_t w1,
  input  cword_t w2,
  input  cword_t w3,
  input  tag_t   tag_i,
  output cdig_t  y0,
  output cdig_t  y1,
  output cdig_t  y2,
  output cdig_t  y3,
  output tag_t   tag_o
);

  cdig_t s0, s1, d0, d1, f0, f1, f2, f3;
  tag_t  t_s0, t_s1, t_d0, t_d1, t_f0, t_f1, t_f2, t_f3, t_y2, t_y3;

  bs_caddsub #(.SUB_RE(1'b0), .SUB_IM(1'b0), .SWAP_B(1'b0)) u_s0
    (.clk, .rst_n, .a(a), .b(c), .tag_i, .s(s0), .tag_o(t_s0));
  bs_caddsub #(.SUB_RE(1'b0), .SUB_IM(1'b0), .SWAP_B(1'b0)) u_s1
    (.clk, .rst_n, .a(b), .b(d), .tag_i, .s(s1), .tag_o(t_s1));
  bs_caddsub #(.SUB_RE(1'b1), .SUB_IM(1'b1), .SWAP_B(1'b0)) u_d0
    (.clk, .rst_n, .a(a), .b(c), .tag_i, .s(d0), .tag_o(t_d0));
  bs_caddsub #(.SUB_RE(1'b1), .SUB_IM(1'b1), .SWAP_B(1'b0)) u_d1
    (.clk, .rst_n, .a(b), .b(d), .tag_i, .s(d1), .tag_o(t_d1));

  bs_caddsub #(.SUB_RE(1'b0), .SUB_IM(1'b0), .SWAP_B(1'b0)) u_f0
    (.clk, .rst_n, .a(s0), .b(s1), .tag_i(t_s0), .s(f0), .tag_o(t_f0));
  bs_caddsub #(.SUB_RE(1'b1), .SUB_IM(1'b1), .SWAP_B(1'b0)) u_f2
    (.clk, .rst_n, .a(s0), .b(s1), .tag_i(t_s0), .s(f2), .tag_o(t_f2));
  bs_caddsub #(.SUB_RE(1'b0), .SUB_IM(1'b1), .SWAP_B(1'b1)) u_f1
    (.clk, .rst_n, .a(d0), .b(d1), .tag_i(t_d0), .s(f1), .tag_o(t_f1));
  bs_caddsub #(.SUB_RE(1'b1), .SUB_IM(1'b0), .SWAP_B(1'b1)) u_f3
    (.clk, .rst_n, .a(d0), .b(d1), .tag_i(t_d0), .s(f3), .tag_o(t_f3));

  bs_cmult u_m1 (.clk, .rst_n, .a(f1), .w(w1), .tag_i(t_f1), .p(y1), .tag_o(tag_o));
  bs_cmult u_m2 (.clk, .rst_n, .a(f2), .w(w2), .tag_i(t_f2), .p(y2), .tag_o(t_y2));
  bs_cmult u_m3 (.clk, .rst_n, .a(f3), .w(w3), .tag_i(t_f3), .p(y3), .tag_o(t_y3));

  bs_delay #(.N(LAT_CMUL), .WIDTH($bits(cdig_t))) u_dly0 (.clk, .d(f0), .q(y0));

endmodule
